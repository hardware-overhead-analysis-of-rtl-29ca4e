// tb_arx_core: runs * operations on the custom core and checks Z against the
// reference model, the 5-cycle latency from the last load chunk to arx_flag,
// and a FIFO-full stall: three results are produced without popping, the
// third waits until words are popped.
module tb_arx_core;
  import pi_ref_pkg::*;
  logic        clk = 0, rst_n = 0, load = 0, pop = 0;
  logic [31:0] ix = 0, iy = 0;
  logic        ready, opv, flag, stall;
  logic [63:0] opb;
  int checks = 0, failures = 0, stalls = 0;

  arx_core dut (.clk(clk), .rst_n(rst_n), .arx_load(load), .inpx(ix), .inpy(iy), .ready(ready),
                .pop(pop), .op_bus(opb), .op_valid(opv), .arx_flag(flag), .stall(stall));
  always #5 clk = ~clk;
  always @(posedge clk) if (stall) stalls++;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(q4_t x, q4_t y, output int lat);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      load = 1; ix = x[k/2][(k%2)*32 +: 32]; iy = y[k/2][(k%2)*32 +: 32];
    end
    @(negedge clk) load = 0;
    lat = 1;
    while (!flag && lat < 100) begin @(negedge clk); lat++; end
  endtask

  task automatic take(q4_t z);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      while (!opv) @(negedge clk);
      chk(opb === z[k], "result word");
      pop = 1;
      @(negedge clk) pop = 0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q4_t x [3], y [3];
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 10; it++) begin
      x[0] = rand_q4(); y[0] = rand_q4();
      send(x[0], y[0], lat);
      chk(lat == 5, "latency");
      take(star(x[0], y[0]));
    end
    // fill the FIFO: two results fit, the third stalls
    for (int r = 0; r < 3; r++) begin x[r] = rand_q4(); y[r] = rand_q4(); end
    send(x[0], y[0], lat);
    send(x[1], y[1], lat);
    fork
      send(x[2], y[2], lat);
      begin repeat (30) @(negedge clk); end
    join_any
    disable fork;
    chk(stall, "stalled with a full FIFO");
    take(star(x[0], y[0]));
    take(star(x[1], y[1]));
    take(star(x[2], y[2]));
    chk(stalls > 0, "stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
