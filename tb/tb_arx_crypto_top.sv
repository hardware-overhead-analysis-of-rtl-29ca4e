// tb_arx_crypto_top: end-to-end test of both engines at their default sizes,
// running at the same time.
//
// The custom engine computes a Pi-cipher round.  Meanwhile the programmable
// element computes J0 = CI * I0, the round's first * operation, from a
// program streamed through its 64-slot instruction RAM (it does not fit at
// once), followed by 16-bit and 32-bit ALU and rotator instructions.  Both
// results are checked against the reference model, and the test counts how
// often each mechanism was used: accumulator chaining, write-first reads of
// a word written the cycle before, each ALU and rotator width, programming
// while running, and instruction slots reused.
module tb_arx_crypto_top;
  import ppe_pkg::*;
  import ppe_prog_pkg::*;
  import pi_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        pe = 0, ce = 0;
  logic [5:0]  pa = 0, ia = 0;
  logic [55:0] pd = '0;
  logic [63:0] din = '0, pout;
  logic        pov;
  logic        start = 0, busy, done;
  q4_t         si [4], so [4], ci, cr, ek [4];
  logic [63:0] outs [$];
  int checks = 0, failures = 0;
  int n_acc = 0, n_bypass = 0, n_alu16 = 0, n_alu32 = 0, n_alu64 = 0;
  int n_rot16 = 0, n_rot32 = 0, n_rot64 = 0, n_overlap = 0, n_wrap = 0, n_round = 0;

  arx_crypto_top dut (
    .clk(clk), .rst_n(rst_n),
    .ppe_prog_en(pe), .ppe_prog_addr(pa), .ppe_prog_data(pd), .ppe_cfg_en(ce),
    .ppe_instr_addr(ia), .ppe_data_in(din), .ppe_out(pout), .ppe_out_valid(pov),
    .pi_start(start), .pi_state_in(si), .pi_ci(ci), .pi_cr(cr), .pi_busy(busy),
    .pi_done(done), .pi_state_out(so)
  );
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (pov) outs.push_back(pout);
    if (dut.u_ppe.u_pe.ex_valid) begin
      ppe_instr_t e;
      e = dut.u_ppe.u_pe.ex;
      if (e.acc[1]) n_acc++;
      if (e.alu_mode == ALU_MODE_16 && e.alu_op == ALU_ADD && !e.io[0]) n_alu16++;
      if (e.alu_mode == ALU_MODE_32 && e.alu_op == ALU_ADD && !e.io[0]) n_alu32++;
      if (e.alu_mode == ALU_MODE_64 && e.alu_op == ALU_ADD && !e.io[0] && !e.io[1]) n_alu64++;
      if (e.io[0] && e.rot_mode == ROT_16) n_rot16++;
      if (e.io[0] && (e.rot_mode == ROT_32_R0 || e.rot_mode == ROT_32_R16)) n_rot32++;
      if (e.io[0] && e.rot_mode[0] && !e.rot_mode[1]) n_rot64++;
    end
    if (dut.u_ppe.u_pe.u_ram.we && dut.u_ppe.u_pe.u_ram.re &&
        (dut.u_ppe.u_pe.u_ram.addr_w == dut.u_ppe.u_pe.u_ram.addr_a ||
         dut.u_ppe.u_pe.u_ram.addr_w == dut.u_ppe.u_pe.u_ram.addr_b)) n_bypass++;
    if (pe && ce) n_overlap++;
    if (done) n_round++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int NX = 6;
    localparam int N  = NPROG + NX;
    ppe_instr_t  prog [NPROG];
    ppe_instr_t  s [N];
    logic [63:0] v [N];
    q4_t         j0;
    logic [63:0] a, b, e16, e32, er16, er32;
    logic [63:0] cst [8] = '{64'hF0E8E4E2E1D8D4D2, 64'hD1CCCAC9C6C5C3B8, 64'hB4B2B1ACAAA9A6A5,
                             64'hA39C9A999695938E, 64'h8D8B87787472716C, 64'h6A696665635C5A59,
                             64'h5655534E4D4B473C, 64'h3A393635332E2D2B};
    for (int n = 0; n < 4; n++) si[n] = rand_q4();
    ci = rand_q4(); cr = rand_q4();
    round(si, ci, cr, ek);
    j0 = star(ci, si[0]);

    // programmable element: * operation then narrow-width instructions
    star_program(prog);
    for (int n = 0; n < NPROG; n++) begin
      s[n] = prog[n];
      v[n] = (n < 4) ? ci[n] : (n < 8) ? si[0][n-4] : (n < 16) ? cst[n-8] : '0;
    end
    a = {$urandom, $urandom}; b = {$urandom, $urandom};
    for (int k = 0; k < 4; k++) e16[k*16 +: 16] = a[k*16 +: 16] + b[k*16 +: 16];
    e32  = {a[63:32] + b[63:32], a[31:0] + b[31:0]};
    for (int k = 0; k < 4; k++) er16[k*16 +: 16] = {b[k*16 +: 16], b[k*16 +: 16]} >> 3;
    er32[31:0]  = 32'({b[31:0], b[31:0]} >> 21);      // 32-bit rotate right by 16+5
    er32[63:32] = 32'({b[63:32], b[63:32]} >> 21);
    s[NPROG]   = ld(40); v[NPROG]   = a;
    s[NPROG+1] = ld(41); v[NPROG+1] = b;
    s[NPROG+2] = mk(2'b00, 11'd0, 4'd0, 2'b00, ALU_MODE_16, ALU_ADD, 2'b01, 0, 41, 40);
    s[NPROG+3] = mk(2'b00, 11'd0, 4'd0, 2'b00, ALU_MODE_32, ALU_ADD, 2'b01, 0, 41, 40);
    s[NPROG+4] = mk(2'b01, ROT_16, 4'd3, 2'b00, ALU_MODE_16, ALU_ADD, 2'b01, 0, 41, 40);
    s[NPROG+5] = mk(2'b01, ROT_32_R16, 4'd5, 2'b00, ALU_MODE_16, ALU_ADD, 2'b01, 0, 41, 40);
    for (int n = NPROG + 2; n < N; n++) v[n] = '0;

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int t = 0; t < N + 6; t++) begin
      pe  = (t < N);
      pa  = 6'(t % 64);
      pd  = (t < N) ? s[t] : '0;
      ce  = (t >= 1 && t - 1 < N);
      ia  = 6'((t - 1) % 64);
      din = (t >= 3 && t - 3 < N) ? v[t-3] : '0;
      if (pe && t >= 64) n_wrap++;
      @(negedge clk);
    end
    pe = 0; ce = 0;
    chk(outs.size() == N, "PPE output count");
    chk(outs[NPROG-4] === j0[3] && outs[NPROG-3] === j0[0] &&
        outs[NPROG-2] === j0[1] && outs[NPROG-1] === j0[2], "PPE * result");
    chk(outs[NPROG+2] === e16, "PPE 16-bit add");
    chk(outs[NPROG+3] === e32, "PPE 32-bit add");
    chk(outs[NPROG+4] === er16, "PPE 16-bit rotate");
    chk(outs[NPROG+5] === er32, "PPE 32-bit rotate");

    while (!done) @(negedge clk);
    @(negedge clk);
    for (int n = 0; n < 4; n++) chk(so[n] === ek[n], "Pi round chunk");
    chk(dut.u_pi.j_q[0] === j0, "custom J0 equals reference");

    $display("mechanisms: acc=%0d bypass=%0d alu16=%0d alu32=%0d alu64=%0d rot16=%0d rot32=%0d rot64=%0d overlap=%0d wrap=%0d rounds=%0d",
             n_acc, n_bypass, n_alu16, n_alu32, n_alu64, n_rot16, n_rot32, n_rot64, n_overlap, n_wrap, n_round);
    chk(n_acc > 0, "accumulator chaining");
    chk(n_bypass > 0, "write-first read");
    chk(n_alu16 > 0 && n_alu32 > 0 && n_alu64 > 0, "all ALU widths");
    chk(n_rot16 > 0 && n_rot32 > 0 && n_rot64 > 0, "all rotator widths");
    chk(n_overlap > 0, "programming while running");
    chk(n_wrap > 0, "instruction slots reused");
    chk(n_round == 1, "one round done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
