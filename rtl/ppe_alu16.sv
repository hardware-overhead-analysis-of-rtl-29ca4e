// ppe_alu16: one 16-bit slice of the PPE ALU.
//
// Computes x+y+cin, x^y, x or y according to the operation.  The carry out
// of the addition is brought out so that the ALU can chain slices into 32-
// and 64-bit adders.  Purely combinational.
module ppe_alu16
  import ppe_pkg::*;
(
  input  logic [LANE_W-1:0] x,
  input  logic [LANE_W-1:0] y,
  input  logic              cin,
  input  alu_op_e           op,
  output logic [LANE_W-1:0] z,
  output logic              cout
);
  logic [LANE_W:0] sum;

  always_comb begin
    sum  = {1'b0, x} + {1'b0, y} + {{LANE_W{1'b0}}, cin};
    cout = sum[LANE_W];
    unique case (op)
      ALU_ADD:   z = sum[LANE_W-1:0];
      ALU_XOR:   z = x ^ y;
      ALU_PASSX: z = x;
      default:   z = y;
    endcase
  end
endmodule
