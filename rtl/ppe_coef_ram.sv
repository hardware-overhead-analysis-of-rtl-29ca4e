// ppe_coef_ram: the PPE's coefficient memory, a 512-byte block RAM of 64
// words of 64 bits with two read ports (A and B) and one write port.
//
// Reads are synchronous: with re high, the words at addr_a and addr_b appear
// on port_a and port_b after the next clock edge; with re low the ports hold
// their last words.  A write happens at the clock edge when we is high.  When
// a port reads the word being written in the same cycle it returns the new
// word (write-first), so an instruction can use the result of the one before
// it without a gap.  Size, address widths and port count follow the
// document; write-first and the read enable are this design's choices.  The
// array has no reset; the two port registers reset to zero.
module ppe_coef_ram
  import ppe_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr_w,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         port_a,
  output logic [WIDTH-1:0]         port_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr_w] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_a <= '0;
      port_b <= '0;
    end else if (re) begin
      port_a <= (we && addr_w == addr_a) ? wdata : mem[addr_a];
      port_b <= (we && addr_w == addr_b) ? wdata : mem[addr_b];
    end
  end
endmodule
