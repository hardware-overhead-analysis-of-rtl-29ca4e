// tb_arx_buffer: loads random 4-word operands chunk by chunk over the 32-bit
// bus in random chunk order and checks the assembled words, and that a
// cycle without write enable changes nothing.
module tb_arx_buffer;
  import pi_ref_pkg::*;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [2:0]  addr = 0;
  logic [31:0] din = 0;
  q4_t         q, exp;
  int checks = 0, failures = 0;

  arx_buffer dut (.clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .din(din), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (q !== '0) failures++;
    rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      int order [8];
      exp = rand_q4();
      for (int k = 0; k < 8; k++) order[k] = k;
      order.shuffle();
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        we = 1; addr = 3'(order[k]);
        din = exp[order[k] / 2][(order[k] % 2) * 32 +: 32];
      end
      @(negedge clk) begin we = 0; din = $urandom; addr = 3'($urandom); end
      @(negedge clk);
      checks++;
      if (q !== exp) begin failures++; $display("FAIL q=%h exp=%h", q, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
