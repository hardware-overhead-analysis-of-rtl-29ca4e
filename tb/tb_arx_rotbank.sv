// tb_arx_rotbank: checks the fixed left rotations of both directions
// (7, 19, 31, 53 and 11, 23, 37, 59) and the register enable.
module tb_arx_rotbank;
  import pi_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  q4_t  d, rx, ry, ex, ey;
  int checks = 0, failures = 0;
  int mr [4] = '{7, 19, 31, 53};
  int nr [4] = '{11, 23, 37, 59};

  arx_rotbank #(.IS_NU(1'b0)) ux (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .r(rx));
  arx_rotbank #(.IS_NU(1'b1)) uy (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .r(ry));
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
      if (en) for (int k = 0; k < 4; k++) begin
        ex[k] = rotl(d[k], mr[k]);
        ey[k] = rotl(d[k], nr[k]);
      end
      #1;
      checks += 2;
      if (rx !== ex) begin failures++; $display("FAIL x %h %h", rx, ex); end
      if (ry !== ey) begin failures++; $display("FAIL y"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
