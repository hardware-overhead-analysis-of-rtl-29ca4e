// ppe_top: the programmable ARX processing element with its instruction RAM.
//
// Host software writes 56-bit instructions through the programming port and
// runs them by presenting instruction addresses with cfg_en high, one per
// clock; each instruction read is executed by the processing element.
// Because the instruction RAM is dual-ported, programming and running can
// overlap.  Latency: an instruction addressed in cycle c is read in c+1,
// executes in c+2 (its write-back lands at the end of c+2) and its result is
// on pe_out in c+3.  Both port groups and their widths follow the published design;
// that the host drives the instruction address directly is taken from the
// document's programming-model figure.
module ppe_top
  import ppe_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prog_en,
  input  logic [IADDR_W-1:0] prog_addr,
  input  logic [INSTR_W-1:0] prog_data,
  input  logic               cfg_en,
  input  logic [IADDR_W-1:0] instr_addr,
  input  logic [DATA_W-1:0]  data_in,
  output logic [DATA_W-1:0]  pe_out,
  output logic               pe_out_valid
);
  logic [INSTR_W-1:0] instr_word;
  logic               instr_valid;

  ppe_instr_ram u_iram (
    .clk        (clk),
    .rst_n      (rst_n),
    .prog_en    (prog_en),
    .prog_addr  (prog_addr),
    .prog_data  (prog_data),
    .cfg_en     (cfg_en),
    .instr_addr (instr_addr),
    .instr      (instr_word),
    .instr_valid(instr_valid)
  );

  ppe_core u_pe (
    .clk         (clk),
    .rst_n       (rst_n),
    .instr       (ppe_instr_t'(instr_word)),
    .instr_valid (instr_valid),
    .data_in     (data_in),
    .pe_out      (pe_out),
    .pe_out_valid(pe_out_valid)
  );
endmodule
