// arx_xorbank: the step-2 XOR network of one direction of the * operation.
//
// Each output is the XOR of three of the four rotated words: for X
// (IS_NU = 0) T4 = T0^T1^T3, T5 = T0^T1^T2, T6 = T1^T2^T3, T7 = T0^T2^T3;
// for Y (IS_NU = 1) T8 = T1^T2^T3, T9 = T0^T2^T3, T10 = T0^T1^T3,
// T11 = T0^T1^T2.  Output k (T4+k or T8+k) is registered when en (XXC /
// YXC) is high.  The XOR equations follow the published design; the register is this
// design's choice.
module arx_xorbank
  import pi_pkg::*;
#(
  parameter bit IS_NU = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  quad_t d,
  output quad_t x
);
  quad_t mix;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      mix[k] = '0;
      for (int j = 0; j < 4; j++) begin
        if (j != int'(IS_NU ? NU_XSKIP[k] : MU_XSKIP[k])) mix[k] = mix[k] ^ d[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  x <= '0;
    else if (en) x <= mix;
  end
endmodule
