// tb_ppe_coef_ram: fills the 64-word coefficient RAM, reads it back through
// both ports with a one-cycle latency, checks that a disabled read holds the
// ports and that a read of the word being written returns the new word.
module tb_ppe_coef_ram;
  logic        clk = 0, rst_n = 0, re = 0, we = 0;
  logic [5:0]  aa = 0, ab = 0, aw = 0;
  logic [63:0] wd = '0, pa, pb;
  logic [63:0] model [64];
  int checks = 0, failures = 0, bypasses = 0;

  ppe_coef_ram dut (.clk(clk), .rst_n(rst_n), .re(re), .addr_a(aa), .addr_b(ab),
                    .we(we), .addr_w(aw), .wdata(wd), .port_a(pa), .port_b(pb));
  always #5 clk = ~clk;

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 1; aw = 6'(a); wd = {$urandom, $urandom}; model[a] = wd;
    end
    @(negedge clk) we = 0;
    for (int it = 0; it < 300; it++) begin
      logic [5:0] a, b;
      a = 6'($urandom); b = 6'($urandom);
      @(negedge clk);
      re = 1; aa = a; ab = b;
      we = 1'($urandom); aw = (it % 3 == 0) ? a : 6'($urandom); wd = {$urandom, $urandom};
      @(posedge clk);
      if (we && aw == a) bypasses++;
      if (we) model[aw] = wd;
      #1;
      chk(pa, model[a], "port A");
      chk(pb, model[b], "port B");
    end
    // read disabled: ports keep their words
    @(negedge clk) begin re = 0; we = 0; aa = aa + 1; ab = ab + 1; end
    begin
      logic [63:0] ha, hb;
      ha = pa; hb = pb;
      @(posedge clk); #1;
      chk(pa, ha, "hold A");
      chk(pb, hb, "hold B");
    end
    checks++;
    if (bypasses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
