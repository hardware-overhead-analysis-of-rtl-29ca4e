// tb_ppe_top: streams two copies of the 68-instruction * operation program
// through the 64-slot instruction RAM, writing instruction n into slot n mod
// 64 one cycle before it is run, so that the program never fits at once and
// programming overlaps execution.  Checks both Z results against the
// reference model and the three-cycle latency from address to output.
module tb_ppe_top;
  import ppe_pkg::*;
  import ppe_prog_pkg::*;
  import pi_ref_pkg::*;

  logic        clk = 0, rst_n = 0, pe = 0, ce = 0;
  logic [5:0]  pa = 0, ia = 0;
  logic [55:0] pd = '0;
  logic [63:0] din = '0, pe_out;
  logic        pov;
  int checks = 0, failures = 0, overlap = 0, wraps = 0;
  logic [63:0] outs [$];

  ppe_top dut (.clk(clk), .rst_n(rst_n), .prog_en(pe), .prog_addr(pa), .prog_data(pd),
               .cfg_en(ce), .instr_addr(ia), .data_in(din), .pe_out(pe_out), .pe_out_valid(pov));
  always #5 clk = ~clk;

  always @(posedge clk) if (pov) outs.push_back(pe_out);

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int N = 2 * NPROG;
    ppe_instr_t  prog [NPROG];
    ppe_instr_t  s [N];
    logic [63:0] v [N];
    q4_t         x [2], y [2], z [2];
    logic [63:0] cst [8] = '{64'hF0E8E4E2E1D8D4D2, 64'hD1CCCAC9C6C5C3B8, 64'hB4B2B1ACAAA9A6A5,
                             64'hA39C9A999695938E, 64'h8D8B87787472716C, 64'h6A696665635C5A59,
                             64'h5655534E4D4B473C, 64'h3A393635332E2D2B};
    star_program(prog);
    for (int r = 0; r < 2; r++) begin
      x[r] = rand_q4(); y[r] = rand_q4(); z[r] = star(x[r], y[r]);
      for (int n = 0; n < NPROG; n++) begin
        s[r*NPROG + n] = prog[n];
        v[r*NPROG + n] = (n < 4) ? x[r][n] : (n < 8) ? y[r][n-4] : (n < 16) ? cst[n-8] : '0;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < N + 6; t++) begin
      @(negedge clk);
      pe  = (t < N);
      pa  = 6'(t % 64);
      pd  = (t < N) ? s[t] : '0;
      ce  = (t >= 1 && t - 1 < N);
      ia  = 6'((t - 1) % 64);
      din = (t >= 3 && t - 3 < N) ? v[t-3] : '0;
      if (pe && ce) overlap++;
      if (pe && t >= 64) wraps++;
    end
    for (int r = 0; r < 2; r++) begin
      int b;
      b = r * NPROG;
      chk(outs[b + NPROG-4], z[r][3], "Z3");
      chk(outs[b + NPROG-3], z[r][0], "Z0");
      chk(outs[b + NPROG-2], z[r][1], "Z1");
      chk(outs[b + NPROG-1], z[r][2], "Z2");
    end
    chk(64'(outs.size()), 64'(N), "output count");
    // latency from cfg_en to pe_out_valid
    begin
      int c1;
      c1 = -1;
      @(negedge clk) begin ce = 1; ia = 0; end
      @(negedge clk) ce = 0;
      for (int k = 1; k < 7; k++) begin
        if (pov && c1 < 0) c1 = k;
        @(negedge clk);
      end
      chk(64'(c1), 64'd3, "latency");
    end
    checks++; if (overlap == 0 || wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
