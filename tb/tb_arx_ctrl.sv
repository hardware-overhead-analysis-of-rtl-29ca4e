// tb_arx_ctrl: checks the control unit's schedule: chunk addresses 0..7 on
// loads (with gaps between them), then exactly one stage enable per cycle in
// the order adders, rotators, XOR banks, output adders, FIFO push, ready low
// during the compute stages, the flag pulse, and the wait (stall) while the
// FIFO has no room.
module tb_arx_ctrl;
  logic       clk = 0, rst_n = 0, load = 0, room = 1;
  logic       ready, bwe, xrc, yrc, xxc, yxc, oac, fifoc, flag, stall;
  logic [2:0] addx, addy;
  logic [3:0] xa, ya;
  int checks = 0, failures = 0, stalls = 0;

  arx_ctrl dut (.clk(clk), .rst_n(rst_n), .arx_load(load), .fifo_room(room), .ready(ready),
                .buf_we(bwe), .addx(addx), .addy(addy), .xa_c(xa), .ya_c(ya), .xrc(xrc), .yrc(yrc),
                .xxc(xxc), .yxc(yxc), .oac(oac), .fifoc(fifoc), .arx_flag(flag), .stall(stall));
  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
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
    for (int op = 0; op < 6; op++) begin
      int k;
      k = 0;
      while (k < 8) begin
        @(negedge clk);
        load = ($urandom_range(0, 2) != 0);
        #1;
        chk(ready, "ready while loading");
        chk(bwe == load, "buffer write");
        if (load) begin chk(addx == 3'(k) && addy == 3'(k), "chunk address"); k++; end
        chk({xa, ya, xrc, yrc, xxc, yxc, oac, fifoc} == '0, "no stage during load");
      end
      @(negedge clk) load = 0;
      #1 chk(xa == 4'hF && ya == 4'hF && !ready && {xrc, xxc, oac, fifoc} == '0, "adders");
      @(negedge clk);
      #1 chk(xrc && yrc && xa == 0 && {xxc, oac, fifoc} == '0, "rotators");
      @(negedge clk);
      #1 chk(xxc && yxc && !xrc && {oac, fifoc} == '0, "xor banks");
      @(negedge clk);
      #1 chk(oac && !xxc && !fifoc, "output adders");
      @(negedge clk);
      room = (op % 2 == 0);
      #1;
      if (!room) begin
        for (int w = 0; w < 3; w++) begin
          chk(stall && !fifoc && !flag && !ready, "stall");
          stalls++;
          @(negedge clk);
        end
        room = 1;
        #1;
      end
      chk(fifoc && flag && !stall, "push and flag");
      @(negedge clk);
      #1 chk(!flag && ready, "back to ready");
    end
    chk(stalls > 0, "stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
