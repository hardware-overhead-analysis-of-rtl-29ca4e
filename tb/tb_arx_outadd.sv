// tb_arx_outadd: checks the sigma adders, Z3 = T4+T8, Z0 = T5+T9,
// Z1 = T6+T10, Z2 = T7+T11, and the register enable.
module tb_arx_outadd;
  import pi_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  q4_t  mu, nu, z, ez;
  int checks = 0, failures = 0;

  arx_outadd dut (.clk(clk), .rst_n(rst_n), .en(en), .mu(mu), .nu(nu), .z(z));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ez = '0; mu = '0; nu = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      mu = rand_q4(); nu = rand_q4();
      en = (it % 5 != 4);
      @(posedge clk);
      if (en) begin
        ez[3] = mu[0] + nu[0];
        ez[0] = mu[1] + nu[1];
        ez[1] = mu[2] + nu[2];
        ez[2] = mu[3] + nu[3];
      end
      #1;
      checks++;
      if (z !== ez) begin failures++; $display("FAIL z=%h exp=%h", z, ez); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
