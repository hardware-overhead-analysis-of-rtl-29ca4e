// tb_ppe_round: a whole 64-bit Pi-cipher round run as a program on the
// programmable element.  The 448-instruction program is streamed through the
// 64-slot instruction RAM, one instruction per clock, slot n mod 64 written
// one cycle before it runs.  Every intermediate J and K and the round output
// are checked against the reference model, and the run must take one cycle
// per instruction plus the three-cycle latency.
module tb_ppe_round;
  import ppe_pkg::*;
  import ppe_prog_pkg::*;
  import pi_ref_pkg::*;

  logic        clk = 0, rst_n = 0, pe = 0, ce = 0;
  logic [5:0]  pa = 0, ia = 0;
  logic [55:0] pd = '0;
  logic [63:0] din = '0, pe_out;
  logic        pov;
  int checks = 0, failures = 0, cyc = 0, first = -1, last = -1;
  logic [63:0] outs [$];

  ppe_top dut (.clk(clk), .rst_n(rst_n), .prog_en(pe), .prog_addr(pa), .prog_data(pd),
               .cfg_en(ce), .instr_addr(ia), .data_in(din), .pe_out(pe_out), .pe_out_valid(pov));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (ce && first < 0) first = cyc;
    if (pov) begin outs.push_back(pe_out); last = cyc; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ppe_instr_t  s [$];
    logic [63:0] v [NROUND];
    q4_t         si [4], ci, cr, ek [4], j [4], z;
    logic [63:0] cst [8] = '{64'hF0E8E4E2E1D8D4D2, 64'hD1CCCAC9C6C5C3B8, 64'hB4B2B1ACAAA9A6A5,
                             64'hA39C9A999695938E, 64'h8D8B87787472716C, 64'h6A696665635C5A59,
                             64'h5655534E4D4B473C, 64'h3A393635332E2D2B};
    for (int n = 0; n < 4; n++) si[n] = rand_q4();
    ci = rand_q4(); cr = rand_q4();
    round(si, ci, cr, ek);
    j[0] = star(ci, si[0]);
    for (int n = 1; n < 4; n++) j[n] = star(j[n-1], si[n]);
    round_program(s);
    for (int n = 0; n < NROUND; n++)
      v[n] = (n < 16) ? si[n/4][n%4] : (n < 20) ? ci[n-16] : (n < 24) ? cr[n-20] : (n < 32) ? cst[n-24] : '0;

    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NROUND + 6; t++) begin
      @(negedge clk);
      pe  = (t < NROUND);
      pa  = 6'(t % 64);
      pd  = (t < NROUND) ? s[t] : '0;
      ce  = (t >= 1 && t - 1 < NROUND);
      ia  = 6'((t - 1) % 64);
      din = (t >= 3 && t - 3 < NROUND) ? v[t-3] : '0;
    end
    checks++;
    if (outs.size() != NROUND) begin failures++; $display("FAIL %0d outputs", outs.size()); end
    for (int b = 0; b < 8; b++) begin
      int o;
      o = 32 + b * NBODY + NBODY - 4;
      z = (b < 4) ? j[b] : ek[7 - b];
      checks++;
      if (outs[o] !== z[3] || outs[o+1] !== z[0] || outs[o+2] !== z[1] || outs[o+3] !== z[2]) begin
        failures++;
        $display("FAIL operation %0d", b);
      end
    end
    checks++;
    if (last - first != NROUND - 1 + 3) begin failures++; $display("FAIL cycles %0d", last - first); end
    $display("round on the PPE: %0d instructions, %0d cycles", NROUND, last - first + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
