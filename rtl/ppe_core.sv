// ppe_core: the PPE processing element, the datapath that one 56-bit
// instruction controls.
//
// Port A of the coefficient RAM drives the ALU's X input.  Port B drives the
// rotator and, through a multiplexer, the ALU's Y input, whose other choice
// is the accumulator.  The accumulator takes the ALU result.  An output
// multiplexer picks the ALU or the rotator result as the element's output,
// and a second multiplexer picks that output or the external input as the
// word written back into the coefficient RAM.  That structure and all widths
// follow the published design.
//
// Timing (this design's choice): two stages.  In the cycle an instruction is
// valid its A and B addresses are read.  In the next cycle its ALU, rotator,
// accumulator, multiplexer and write fields act on the words read, and the
// write-back happens at the end of that cycle; the RAM's write-first ports
// let the following instruction read that word at once.  data_in is sampled
// in the second stage.  pe_out is registered: it shows the second stage's
// output one cycle later, with pe_out_valid.  One instruction per cycle, no
// stalls.
module ppe_core
  import ppe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ppe_instr_t        instr,
  input  logic              instr_valid,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] pe_out,
  output logic              pe_out_valid
);
  ppe_instr_t        ex;
  logic              ex_valid;
  logic [DATA_W-1:0] port_a, port_b, yin, alu_z, rot_z, out_c, wdata, acc_q;
  logic [3:0]        rc [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex       <= '0;
      ex_valid <= 1'b0;
    end else begin
      ex       <= instr;
      ex_valid <= instr_valid;
    end
  end

  ppe_coef_ram u_ram (
    .clk   (clk),
    .rst_n (rst_n),
    .re    (instr_valid & instr.rw[0]),
    .addr_a(instr.addra),
    .addr_b(instr.addrb),
    .we    (ex_valid & ex.rw[1]),
    .addr_w(ex.addrw),
    .wdata (wdata),
    .port_a(port_a),
    .port_b(port_b)
  );

  assign yin = ex.acc[1] ? acc_q : port_b;

  ppe_alu u_alu (
    .xin (port_a),
    .yin (yin),
    .mode(ex.alu_mode),
    .op  (ex.alu_op),
    .zout(alu_z)
  );

  ppe_accumulator u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .load (ex_valid & ex.acc[0]),
    .d    (alu_z),
    .q    (acc_q)
  );

  assign rc[0] = ex.rc0;
  assign rc[1] = ex.rc1;
  assign rc[2] = ex.rc2;
  assign rc[3] = ex.rc3;

  ppe_rotator u_rot (
    .din (port_b),
    .mode(ex.rot_mode),
    .rc  (rc),
    .dout(rot_z)
  );

  assign out_c = ex.io[0] ? rot_z : alu_z;
  assign wdata = ex.io[1] ? data_in : out_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_out       <= '0;
      pe_out_valid <= 1'b0;
    end else begin
      pe_out       <= out_c;
      pe_out_valid <= ex_valid;
    end
  end
endmodule
