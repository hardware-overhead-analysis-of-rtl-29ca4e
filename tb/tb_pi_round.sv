// tb_pi_round: computes Pi-cipher rounds on random states and round
// constants and checks them against the reference round, and that a round
// takes 8 operations of at most 20 cycles each.
module tb_pi_round;
  import pi_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  q4_t  si [4], so [4], ci, cr, ek [4];
  int checks = 0, failures = 0;

  pi_round dut (.clk(clk), .rst_n(rst_n), .start(start), .state_in(si), .ci(ci), .cr(cr),
                .busy(busy), .done(done), .state_out(so));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) si[n] = '0;
    ci = '0; cr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4; it++) begin
      int cyc;
      @(negedge clk);
      for (int n = 0; n < 4; n++) si[n] = rand_q4();
      ci = rand_q4(); cr = rand_q4();
      round(si, ci, cr, ek);
      start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (so[n] !== ek[n]) begin failures++; $display("FAIL chunk %0d got=%h exp=%h", n, so[n], ek[n]); end
      end
      checks++;
      if (cyc > 160) begin failures++; $display("FAIL round took %0d cycles", cyc); end
      if (it == 0) $display("round cycles: %0d", cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
