// arx_core: the custom Pi-cipher ARX core, one unit for the * operation
// Z = X * Y on 4-word inputs.
//
// X and Y are loaded into their buffers over two 32-bit buses (inpx, inpy),
// one chunk of each per cycle with arx_load high while ready is high.  Then
// the X path (mu) and the Y path (nu) each add constants and input words,
// rotate left by fixed amounts and mix with XORs; four output adders combine
// the two paths, and the four result words go into the output FIFO, from
// which they leave on op_bus one per pop (Z0 first, op_valid while the FIFO
// is not empty).  arx_flag pulses when a result enters the FIFO.  The blocks
// and their connections follow the published design's block diagram; the word width
// is 64 bits, the size for which the published design gives the operation.  Timing:
// 8 load cycles, then 5 cycles to the FIFO if it has room; stall is high
// while a finished result waits for room.
module arx_core
  import pi_pkg::*;
#(
  parameter int unsigned BUS_W      = 32,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned NCH       = 4 * W / BUS_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arx_load,
  input  logic [BUS_W-1:0] inpx,
  input  logic [BUS_W-1:0] inpy,
  output logic             ready,
  input  logic             pop,
  output word_t            op_bus,
  output logic             op_valid,
  output logic             arx_flag,
  output logic             stall
);
  logic                   buf_we, xrc, yrc, xxc, yxc, oac, fifoc, room;
  logic [$clog2(NCH)-1:0] addx, addy;
  logic [3:0]             xa_c, ya_c;
  quad_t                  xq, yq, tx, ty, rx, ry, mx, my, z;

  arx_ctrl #(.NCH(NCH)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .arx_load(arx_load), .fifo_room(room),
    .ready(ready), .buf_we(buf_we), .addx(addx), .addy(addy),
    .xa_c(xa_c), .ya_c(ya_c), .xrc(xrc), .yrc(yrc), .xxc(xxc), .yxc(yxc),
    .oac(oac), .fifoc(fifoc), .arx_flag(arx_flag), .stall(stall)
  );

  arx_buffer  #(.BUS_W(BUS_W)) u_xbuf (.clk(clk), .rst_n(rst_n), .we(buf_we), .addr(addx), .din(inpx), .q(xq));
  arx_buffer  #(.BUS_W(BUS_W)) u_ybuf (.clk(clk), .rst_n(rst_n), .we(buf_we), .addr(addy), .din(inpy), .q(yq));

  arx_addbank #(.IS_NU(1'b0)) u_xadd (.clk(clk), .rst_n(rst_n), .en(xa_c), .d(xq), .t(tx));
  arx_addbank #(.IS_NU(1'b1)) u_yadd (.clk(clk), .rst_n(rst_n), .en(ya_c), .d(yq), .t(ty));

  arx_rotbank #(.IS_NU(1'b0)) u_xrot (.clk(clk), .rst_n(rst_n), .en(xrc), .d(tx), .r(rx));
  arx_rotbank #(.IS_NU(1'b1)) u_yrot (.clk(clk), .rst_n(rst_n), .en(yrc), .d(ty), .r(ry));

  arx_xorbank #(.IS_NU(1'b0)) u_xxor (.clk(clk), .rst_n(rst_n), .en(xxc), .d(rx), .x(mx));
  arx_xorbank #(.IS_NU(1'b1)) u_yxor (.clk(clk), .rst_n(rst_n), .en(yxc), .d(ry), .x(my));

  arx_outadd u_oadd (.clk(clk), .rst_n(rst_n), .en(oac), .mu(mx), .nu(my), .z(z));

  arx_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n), .push(fifoc), .din(z), .pop(pop),
    .op_bus(op_bus), .op_valid(op_valid), .room(room)
  );
endmodule
