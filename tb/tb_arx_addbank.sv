// tb_arx_addbank: checks the X and Y step-1 adder banks against the
// written-out sums, including per-adder enables.
module tb_arx_addbank;
  import pi_ref_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [3:0] en = 0;
  q4_t        d, tx, ty, ex, ey;
  int checks = 0, failures = 0;

  arx_addbank #(.IS_NU(1'b0)) ux (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .t(tx));
  arx_addbank #(.IS_NU(1'b1)) uy (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .t(ty));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ex = '0; ey = '0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      d = rand_q4();
      en = (it < 100) ? 4'hF : 4'($urandom);
      @(posedge clk);
      if (en[0]) ex[0] = 64'hF0E8E4E2E1D8D4D2 + d[0] + d[1] + d[2];
      if (en[1]) ex[1] = 64'hD1CCCAC9C6C5C3B8 + d[0] + d[1] + d[3];
      if (en[2]) ex[2] = 64'hB4B2B1ACAAA9A6A5 + d[0] + d[2] + d[3];
      if (en[3]) ex[3] = 64'hA39C9A999695938E + d[1] + d[2] + d[3];
      if (en[0]) ey[0] = 64'h8D8B87787472716C + d[0] + d[2] + d[3];
      if (en[1]) ey[1] = 64'h6A696665635C5A59 + d[1] + d[2] + d[3];
      if (en[2]) ey[2] = 64'h5655534E4D4B473C + d[0] + d[1] + d[2];
      if (en[3]) ey[3] = 64'h3A393635332E2D2B + d[0] + d[1] + d[3];
      #1;
      checks += 2;
      if (tx !== ex) begin failures++; $display("FAIL x"); end
      if (ty !== ey) begin failures++; $display("FAIL y"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
