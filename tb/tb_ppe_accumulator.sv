// tb_ppe_accumulator: checks reset to zero, load and hold of the accumulator.
module tb_ppe_accumulator;
  logic        clk = 0, rst_n = 0, load = 0;
  logic [63:0] d = '0, q, model;
  int checks = 0, failures = 0;

  ppe_accumulator dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 checks++; if (q !== 64'd0) failures++;
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = {$urandom, $urandom};
      @(posedge clk);
      if (load) model = d;
      #1 checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
