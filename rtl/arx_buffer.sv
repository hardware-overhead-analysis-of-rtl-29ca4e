// arx_buffer: input buffer of the custom Pi-cipher ARX core (the X buffer
// and the Y buffer are two instances).
//
// Holds the four words of one * operation input.  It is loaded over a
// BUS_W-bit bus, one chunk per clock: with we high, chunk addr (chunk 0 the
// least significant BUS_W bits of word 0) is written at the clock edge.
// All four words are visible at once on q, where the adders read them.  The
// 32-bit load bus with its address follows the published design; chunk order and the
// reset to zero are this design's choices.
module arx_buffer
  import pi_pkg::*;
#(
  parameter int unsigned BUS_W = 32,
  localparam int unsigned NCH  = 4 * W / BUS_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [$clog2(NCH)-1:0] addr,
  input  logic [BUS_W-1:0]       din,
  output quad_t                  q
);
  logic [4*W-1:0] flat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  flat <= '0;
    else if (we) flat[addr*BUS_W +: BUS_W] <= din;
  end

  assign q = quad_t'(flat);
endmodule
