// ppe_instr_ram: the PPE's dual-ported instruction RAM, 64 instructions of
// 56 bits (448 bytes).
//
// The programming port (prog_en, prog_addr, prog_data) writes one
// instruction per clock.  The configuration port (cfg_en, instr_addr) reads
// one instruction per clock; the word appears on instr after the clock edge,
// with instr_valid high for that cycle.  The two ports are independent, so a
// new program can be written while the current one runs, and a program can
// start before all of it has been written.  A read of the word being written
// in the same cycle returns the new word.  Sizes and the two ports follow the
// document; write-first and instr_valid are this design's choices.
module ppe_instr_ram
  import ppe_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = INSTR_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prog_en,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  logic [WIDTH-1:0]         prog_data,
  input  logic                     cfg_en,
  input  logic [$clog2(DEPTH)-1:0] instr_addr,
  output logic [WIDTH-1:0]         instr,
  output logic                     instr_valid
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_en) mem[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      instr       <= '0;
      instr_valid <= 1'b0;
    end else begin
      instr_valid <= cfg_en;
      if (cfg_en) instr <= (prog_en && prog_addr == instr_addr) ? prog_data : mem[instr_addr];
    end
  end
endmodule
