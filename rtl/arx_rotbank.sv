// arx_rotbank: the left rotator of one direction of the * operation.
//
// Rotates the four adder results left by fixed amounts, 7, 19, 31 and 53 for
// X (IS_NU = 0) and 11, 23, 37 and 59 for Y (IS_NU = 1), and registers them
// when en (XRC / YRC) is high.  The amounts are constants, so the rotator is
// wiring in front of a register.  Amounts follow the published design; the register
// is this design's choice.
module arx_rotbank
  import pi_pkg::*;
#(
  parameter bit IS_NU = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  quad_t d,
  output quad_t r
);
  quad_t rot;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      int unsigned n;
      n = IS_NU ? NU_R[k] : MU_R[k];
      rot[k] = (d[k] << n) | (d[k] >> (W - n));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  r <= '0;
    else if (en) r <= rot;
  end
endmodule
