// arx_ctrl: control unit of the custom ARX core.
//
// While ready is high, each cycle with arx_load high takes one chunk of X
// and one of Y from the two input buses: the unit gives the chunk number on
// addx and addy and raises buf_we.  After the last of the NCH chunks it runs
// the * operation one stage per clock: the step-1 adders (xa_c, ya_c), the
// rotators (xrc, yrc), the XOR banks (xxc, yxc), the output adders (oac),
// and then pushes the result into the FIFO (fifoc), waiting there as long as
// the FIFO lacks room.  arx_flag pulses for one cycle when the result is
// pushed, and the unit is ready for the next load in the same cycle.  The
// control signal names and the load and flag signals follow the published design;
// the stage order follows the operation's equations; the one-stage-per-clock
// schedule is this design's choice.  With the default sizes an operation
// takes 8 load cycles and 5 compute cycles.
module arx_ctrl #(
  parameter int unsigned NCH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   arx_load,
  input  logic                   fifo_room,
  output logic                   ready,
  output logic                   buf_we,
  output logic [$clog2(NCH)-1:0] addx,
  output logic [$clog2(NCH)-1:0] addy,
  output logic [3:0]             xa_c,
  output logic [3:0]             ya_c,
  output logic                   xrc,
  output logic                   yrc,
  output logic                   xxc,
  output logic                   yxc,
  output logic                   oac,
  output logic                   fifoc,
  output logic                   arx_flag,
  output logic                   stall
);
  typedef enum logic [2:0] {S_LOAD, S_ADD, S_ROT, S_XOR, S_OADD, S_PUSH} state_e;

  state_e                 state;
  logic [$clog2(NCH)-1:0] chunk;

  assign ready    = (state == S_LOAD);
  assign buf_we   = ready & arx_load;
  assign addx     = chunk;
  assign addy     = chunk;
  assign xa_c     = {4{state == S_ADD}};
  assign ya_c     = {4{state == S_ADD}};
  assign xrc      = (state == S_ROT);
  assign yrc      = (state == S_ROT);
  assign xxc      = (state == S_XOR);
  assign yxc      = (state == S_XOR);
  assign oac      = (state == S_OADD);
  assign fifoc    = (state == S_PUSH) & fifo_room;
  assign arx_flag = fifoc;
  assign stall    = (state == S_PUSH) & ~fifo_room;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      chunk <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (arx_load) begin
          if (chunk == ($clog2(NCH))'(NCH - 1)) begin
            chunk <= '0;
            state <= S_ADD;
          end else begin
            chunk <= chunk + 1'b1;
          end
        end
        S_ADD:  state <= S_ROT;
        S_ROT:  state <= S_XOR;
        S_XOR:  state <= S_OADD;
        S_OADD: state <= S_PUSH;
        S_PUSH: if (fifo_room) state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

  // The FIFO never receives a push it cannot hold.
  assert property (@(posedge clk) disable iff (!rst_n) fifoc |-> fifo_room);
endmodule
