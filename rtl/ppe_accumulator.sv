// ppe_accumulator: the PPE's 64-bit accumulator.
//
// Takes the ALU result at the clock edge when load is high and otherwise
// keeps its value; it feeds the ALU's Y input through a multiplexer, so a
// chain of additions such as C + X0 + X1 + X2 needs no memory round trip.
// One control bit, as in the published design; reset to zero is this design's
// choice.
module ppe_accumulator
  import ppe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
