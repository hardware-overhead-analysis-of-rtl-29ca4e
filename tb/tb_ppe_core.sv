// tb_ppe_core: runs the 68-instruction program of the 64-bit Pi-cipher *
// operation on the processing element, one instruction per cycle, and checks
// Z against the reference model.  Then checks 16- and 32-bit ALU modes and
// the 16-bit rotator mode through instructions, and the two-cycle latency
// from instruction to pe_out.
module tb_ppe_core;
  import ppe_pkg::*;
  import ppe_prog_pkg::*;
  import pi_ref_pkg::*;

  logic        clk = 0, rst_n = 0, iv = 0;
  ppe_instr_t  instr = '0;
  logic [63:0] din = '0, pe_out;
  logic        pov;
  int checks = 0, failures = 0;
  logic [63:0] outs [$];

  ppe_core dut (.clk(clk), .rst_n(rst_n), .instr(instr), .instr_valid(iv), .data_in(din),
                .pe_out(pe_out), .pe_out_valid(pov));
  always #5 clk = ~clk;

  always @(posedge clk) if (pov) outs.push_back(pe_out);

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  // issue a list of instructions back to back; vals[n] is the external
  // input for instruction n (used by loads, sampled one cycle later)
  task automatic run(ppe_instr_t p [], logic [63:0] vals []);
    for (int n = 0; n <= p.size(); n++) begin
      @(negedge clk);
      if (n < p.size()) begin instr = p[n]; iv = 1; end else iv = 0;
      din = (n > 0) ? vals[n-1] : '0;
    end
    @(negedge clk) iv = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ppe_instr_t  prog [NPROG];
    ppe_instr_t  p [];
    logic [63:0] vals [];
    q4_t         x, y, z;
    logic [63:0] cst [8] = '{64'hF0E8E4E2E1D8D4D2, 64'hD1CCCAC9C6C5C3B8, 64'hB4B2B1ACAAA9A6A5,
                             64'hA39C9A999695938E, 64'h8D8B87787472716C, 64'h6A696665635C5A59,
                             64'h5655534E4D4B473C, 64'h3A393635332E2D2B};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      x = rand_q4(); y = rand_q4();
      z = star(x, y);
      star_program(prog);
      p = new[NPROG]; vals = new[NPROG];
      for (int n = 0; n < NPROG; n++) begin
        p[n] = prog[n];
        vals[n] = (n < 4) ? x[n] : (n < 8) ? y[n-4] : (n < 16) ? cst[n-8] : '0;
      end
      outs.delete();
      run(p, vals);
      chk(64'(outs.size()), 64'(NPROG), "output count");
      chk(outs[NPROG-4], z[3], "Z3");
      chk(outs[NPROG-3], z[0], "Z0");
      chk(outs[NPROG-2], z[1], "Z1");
      chk(outs[NPROG-1], z[2], "Z2");
    end
    // narrow modes: load a, b; add in 16-bit and 32-bit mode; rotate 16-bit lanes
    begin
      logic [63:0] a, b, e16, e32, er;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      for (int k = 0; k < 4; k++) e16[k*16 +: 16] = a[k*16 +: 16] + b[k*16 +: 16];
      e32 = {a[63:32] + b[63:32], a[31:0] + b[31:0]};
      for (int k = 0; k < 4; k++) begin
        logic [15:0] v;
        v = b[k*16 +: 16];
        er[k*16 +: 16] = (v >> (k + 1)) | (v << (15 - k));
      end
      p = new[5]; vals = new[5];
      p[0] = ld(40); vals[0] = a;
      p[1] = ld(41); vals[1] = b;
      p[2] = mk(2'b00, 11'd0, 4'd0, 2'b00, ALU_MODE_16, ALU_ADD, 2'b01, 0, 41, 40);
      p[3] = mk(2'b00, 11'd0, 4'd0, 2'b00, ALU_MODE_32, ALU_ADD, 2'b01, 0, 41, 40);
      p[4] = mk(2'b01, ROT_16, 4'd0, 2'b00, ALU_MODE_16, ALU_ADD, 2'b01, 0, 41, 40);
      p[4].rc0 = 4'd1; p[4].rc1 = 4'd2; p[4].rc2 = 4'd3; p[4].rc3 = 4'd4;
      for (int n = 2; n < 5; n++) vals[n] = '0;
      outs.delete();
      run(p, vals);
      chk(outs[2], e16, "16-bit add");
      chk(outs[3], e32, "32-bit add");
      chk(outs[4], er,  "16-bit rotate");
    end
    // latency: instruction valid in cycle c gives pe_out_valid in c+2
    begin
      int c0, c1, cyc;
      cyc = 0; c1 = -1;
      @(negedge clk) begin instr = ld(50); iv = 1; end
      c0 = 0;
      @(negedge clk) iv = 0;
      for (int k = 1; k < 6; k++) begin
        if (pov && c1 < 0) c1 = k;
        @(negedge clk);
      end
      chk(64'(c1), 64'd2, "latency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
