// tb_ppe_instr_ram: programs the 64 x 56-bit instruction RAM, then reads it
// while writing other words through the programming port at the same time,
// checking the one-cycle read latency, instr_valid and write-first reads.
module tb_ppe_instr_ram;
  logic        clk = 0, rst_n = 0, pe = 0, ce = 0;
  logic [5:0]  pa = 0, ia = 0;
  logic [55:0] pd = '0, instr;
  logic        iv;
  logic [55:0] model [64];
  int checks = 0, failures = 0, overlaps = 0;

  ppe_instr_ram dut (.clk(clk), .rst_n(rst_n), .prog_en(pe), .prog_addr(pa), .prog_data(pd),
                     .cfg_en(ce), .instr_addr(ia), .instr(instr), .instr_valid(iv));
  always #5 clk = ~clk;

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
      pe = 1; pa = 6'(a); pd = {$urandom, $urandom}; model[a] = pd;
    end
    for (int it = 0; it < 300; it++) begin
      logic [5:0] r;
      logic [55:0] exp;
      r = 6'($urandom);
      @(negedge clk);
      ce = 1'($urandom); ia = r;
      pe = 1'($urandom); pa = (it % 4 == 0) ? r : 6'($urandom); pd = {$urandom, $urandom};
      @(posedge clk);
      if (pe && ce) overlaps++;
      if (pe) model[pa] = pd;
      exp = model[r];
      #1;
      checks++;
      if (iv !== ce) begin failures++; $display("FAIL valid"); end
      if (ce) begin
        checks++;
        if (instr !== exp) begin failures++; $display("FAIL addr %0d got=%h exp=%h", r, instr, exp); end
      end
    end
    checks++;
    if (overlaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
