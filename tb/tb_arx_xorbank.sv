// tb_arx_xorbank: checks both step-2 XOR networks against the written-out
// equations and the register enable.
module tb_arx_xorbank;
  import pi_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  q4_t  d, xx, xy, ex, ey;
  int checks = 0, failures = 0;

  arx_xorbank #(.IS_NU(1'b0)) ux (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .x(xx));
  arx_xorbank #(.IS_NU(1'b1)) uy (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .x(xy));
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
      en = (it % 5 != 4);
      @(posedge clk);
      if (en) begin
        ex[0] = d[0] ^ d[1] ^ d[3];  ex[1] = d[0] ^ d[1] ^ d[2];
        ex[2] = d[1] ^ d[2] ^ d[3];  ex[3] = d[0] ^ d[2] ^ d[3];
        ey[0] = d[1] ^ d[2] ^ d[3];  ey[1] = d[0] ^ d[2] ^ d[3];
        ey[2] = d[0] ^ d[1] ^ d[3];  ey[3] = d[0] ^ d[1] ^ d[2];
      end
      #1;
      checks += 2;
      if (xx !== ex) begin failures++; $display("FAIL x"); end
      if (xy !== ey) begin failures++; $display("FAIL y"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
