// tb_arx_fifo: pushes 4-word groups and pops single words at random, checks
// order against a queue model, op_valid, room, and that a push without room
// is dropped.
module tb_arx_fifo;
  import pi_ref_pkg::*;
  logic        clk = 0, rst_n = 0, push = 0, pop = 0;
  q4_t         din;
  logic [63:0] op_bus;
  logic        op_valid, room;
  logic [63:0] model [$];
  int checks = 0, failures = 0, fulls = 0;

  arx_fifo dut (.clk(clk), .rst_n(rst_n), .push(push), .din(din), .pop(pop),
                .op_bus(op_bus), .op_valid(op_valid), .room(room));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      push = ($urandom_range(0, 3) == 0);
      pop  = (it % 200 < 100) ? ($urandom_range(0, 3) == 0) : 1'($urandom);
      din  = rand_q4();
      #1;
      checks += 2;
      if (op_valid !== (model.size() != 0)) begin failures++; $display("FAIL valid"); end
      if (room !== (model.size() <= 4)) begin failures++; $display("FAIL room %0d", model.size()); end
      if (op_valid) begin
        checks++;
        if (op_bus !== model[0]) begin failures++; $display("FAIL data %h %h", op_bus, model[0]); end
      end
      if (!room) fulls++;
      @(posedge clk);
      if (pop && model.size() != 0) void'(model.pop_front());
      if (push && room) for (int k = 0; k < 4; k++) model.push_back(din[k]);
    end
    checks++; if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
