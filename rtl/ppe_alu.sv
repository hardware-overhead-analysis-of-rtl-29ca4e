// ppe_alu: the PPE's ALU, four 16-bit slices that work as four 16-bit, two
// 32-bit or one 64-bit ALU.
//
// Slice k handles bits 16k+15..16k of Xin and Yin.  Bit k of the 3-bit mode
// joins slice k to slice k+1 by passing slice k's carry into slice k+1; a
// cleared bit gives slice k+1 a carry in of zero.  Mode 000 is four 16-bit
// ALUs, 101 two 32-bit ALUs and 111 one 64-bit ALU; the remaining codes give
// mixed word widths.  The split into four 16-bit slices under a mode and
// operation input follows the published design; the per-boundary encoding of the
// mode is this design's choice.  The mode logic needs no state, so the
// controlling block is a decoder rather than a sequential machine.
// Combinational: Zout follows the inputs in the same cycle.
module ppe_alu
  import ppe_pkg::*;
(
  input  logic [DATA_W-1:0] xin,
  input  logic [DATA_W-1:0] yin,
  input  logic [2:0]        mode,
  input  alu_op_e           op,
  output logic [DATA_W-1:0] zout
);
  logic [LANES:0] carry;

  assign carry[0] = 1'b0;

  for (genvar k = 0; k < LANES; k++) begin : g_slice
    logic cout;
    ppe_alu16 u_slice (
      .x   (xin[k*LANE_W +: LANE_W]),
      .y   (yin[k*LANE_W +: LANE_W]),
      .cin (carry[k]),
      .op  (op),
      .z   (zout[k*LANE_W +: LANE_W]),
      .cout(cout)
    );
    if (k < LANES - 1) begin : g_link
      assign carry[k+1] = cout & mode[k];
    end else begin : g_last
      assign carry[k+1] = cout;   // carry out of the top slice is dropped
    end
  end
endmodule
