// tb_ppe_rotator: checks every row of the rotator mode table.  The expected
// value is a right rotation of the 64-bit word, of each 32-bit half or of
// each 16-bit lane, by the row's base amount plus the lane count, computed
// with native rotations of that width.
module tb_ppe_rotator;
  import ppe_pkg::*;
  logic [63:0] d, q, exp;
  logic [10:0] mode;
  logic [3:0]  rc [4];
  int checks = 0, failures = 0;

  ppe_rotator dut (.din(d), .mode(mode), .rc(rc), .dout(q));

  function automatic logic [63:0] ror64(logic [63:0] v, int n);
    n = n % 64;
    return (n == 0) ? v : ((v >> n) | (v << (64 - n)));
  endfunction
  function automatic logic [31:0] ror32(logic [31:0] v, int n);
    n = n % 32;
    return (n == 0) ? v : ((v >> n) | (v << (32 - n)));
  endfunction
  function automatic logic [15:0] ror16(logic [15:0] v, int n);
    n = n % 16;
    return (n == 0) ? v : ((v >> n) | (v << (16 - n)));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] modes [7] = '{ROT_64_R0, ROT_64_R16, ROT_64_R32, ROT_64_R48, ROT_32_R0, ROT_32_R16, ROT_16};
    int          base  [7] = '{0, 16, 32, 48, 0, 16, 0};
    for (int it = 0; it < 700; it++) begin
      int r, row;
      row = it % 7;
      d = {$urandom, $urandom};
      r = $urandom_range(0, 15);
      mode = modes[row];
      for (int i = 0; i < 4; i++) rc[i] = (row == 6) ? 4'($urandom_range(0, 15)) : 4'(r);
      #1;
      if (row < 4) exp = ror64(d, base[row] + r);
      else if (row < 6) exp = {ror32(d[63:32], base[row] + r), ror32(d[31:0], base[row] + r)};
      else for (int i = 0; i < 4; i++) exp[i*16 +: 16] = ror16(d[i*16 +: 16], int'(rc[i]));
      checks++;
      if (q !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL row=%0d rc=%0d d=%h q=%h exp=%h", row, r, d, q, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
