// arx_crypto_top: two ARX engines side by side.
//
// The programmable processing element (PPE) runs ARX programs from its
// instruction RAM on 16-, 32- or 64-bit words; its programming, run and data
// ports are brought out with a ppe_ prefix.  The custom Pi-cipher engine
// computes one Pi-cipher round in fixed hardware; its ports have a pi_
// prefix.  The two share only clock and reset, and are the programmable and
// the dedicated way of doing the same kind of work.
module arx_crypto_top
  import ppe_pkg::*;
  import pi_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // PPE: host programming and run ports
  input  logic               ppe_prog_en,
  input  logic [IADDR_W-1:0] ppe_prog_addr,
  input  logic [INSTR_W-1:0] ppe_prog_data,
  input  logic               ppe_cfg_en,
  input  logic [IADDR_W-1:0] ppe_instr_addr,
  input  logic [DATA_W-1:0]  ppe_data_in,
  output logic [DATA_W-1:0]  ppe_out,
  output logic               ppe_out_valid,
  // custom Pi-cipher round engine
  input  logic               pi_start,
  input  quad_t              pi_state_in [4],
  input  quad_t              pi_ci,
  input  quad_t              pi_cr,
  output logic               pi_busy,
  output logic               pi_done,
  output quad_t              pi_state_out [4]
);
  ppe_top u_ppe (
    .clk(clk), .rst_n(rst_n),
    .prog_en(ppe_prog_en), .prog_addr(ppe_prog_addr), .prog_data(ppe_prog_data),
    .cfg_en(ppe_cfg_en), .instr_addr(ppe_instr_addr), .data_in(ppe_data_in),
    .pe_out(ppe_out), .pe_out_valid(ppe_out_valid)
  );

  pi_round u_pi (
    .clk(clk), .rst_n(rst_n), .start(pi_start), .state_in(pi_state_in),
    .ci(pi_ci), .cr(pi_cr), .busy(pi_busy), .done(pi_done), .state_out(pi_state_out)
  );
endmodule
