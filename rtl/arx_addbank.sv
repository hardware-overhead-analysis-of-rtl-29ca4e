// arx_addbank: the four step-1 adders of one direction of the * operation.
//
// Adder k adds its constant to the three input words other than SKIP[k]:
// for X (IS_NU = 0) T0 = C0+X0+X1+X2, T1 = C1+X0+X1+X3, T2 = C2+X0+X2+X3,
// T3 = C3+X1+X2+X3, and for Y (IS_NU = 1) T0 = C4+Y0+Y2+Y3,
// T1 = C5+Y1+Y2+Y3, T2 = C6+Y0+Y1+Y2, T3 = C7+Y0+Y1+Y3, all modulo 2^W.
// Each adder's result is registered when its enable (XAkC / YAkC) is high.
// Formulas and constants follow the published design; registering at the adder
// outputs is this design's choice.
module arx_addbank
  import pi_pkg::*;
#(
  parameter bit IS_NU = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] en,
  input  quad_t      d,
  output quad_t      t
);
  quad_t sum;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      sum[k] = IS_NU ? NU_C[k] : MU_C[k];
      for (int j = 0; j < 4; j++) begin
        if (j != int'(IS_NU ? NU_SKIP[k] : MU_SKIP[k])) sum[k] = sum[k] + d[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t <= '0;
    else begin
      for (int k = 0; k < 4; k++) begin
        if (en[k]) t[k] <= sum[k];
      end
    end
  end
endmodule
