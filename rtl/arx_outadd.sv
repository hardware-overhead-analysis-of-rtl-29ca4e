// arx_outadd: the four output adders (the sigma step) of the * operation.
//
// Adds the X and Y results word by word into Z: Z3 = T4+T8, Z0 = T5+T9,
// Z1 = T6+T10, Z2 = T7+T11, modulo 2^W, and registers Z when en (OAC) is
// high.  The equations follow the published design; the register is this design's
// choice.
module arx_outadd
  import pi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  quad_t mu,   // mu[k] is T(4+k)
  input  quad_t nu,   // nu[k] is T(8+k)
  output quad_t z
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) z <= '0;
    else if (en) begin
      for (int k = 0; k < 4; k++) z[(k+3)%4] <= mu[k] + nu[k];
    end
  end
endmodule
