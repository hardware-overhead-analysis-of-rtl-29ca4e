// tb_ppe_alu: checks the PPE ALU in 64-, 32- and 16-bit modes against native
// arithmetic of each width, for add, XOR and the two pass operations, and one
// mixed mode (16+16+32) against a per-segment sum.
module tb_ppe_alu;
  import ppe_pkg::*;
  logic [63:0] x, y, z, exp;
  logic [2:0]  mode;
  alu_op_e     op;
  int checks = 0, failures = 0;

  ppe_alu dut (.xin(x), .yin(y), .mode(mode), .op(op), .zout(z));

  function automatic logic [63:0] ref_add(logic [63:0] a, logic [63:0] b, logic [2:0] m);
    logic [63:0] r;
    if (m == 3'b111) r = a + b;
    else if (m == 3'b101) begin
      r[31:0]  = a[31:0] + b[31:0];
      r[63:32] = a[63:32] + b[63:32];
    end else if (m == 3'b000) begin
      for (int k = 0; k < 4; k++) r[k*16 +: 16] = a[k*16 +: 16] + b[k*16 +: 16];
    end else begin // 3'b100: lanes 0 and 1 alone, lanes 2..3 joined
      r[15:0]  = a[15:0] + b[15:0];
      r[31:16] = a[31:16] + b[31:16];
      r[63:32] = a[63:32] + b[63:32];
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] modes [4] = '{3'b111, 3'b101, 3'b000, 3'b100};
    for (int it = 0; it < 400; it++) begin
      x    = {$urandom, $urandom};
      y    = {$urandom, $urandom};
      if (it % 7 == 0) begin x = '1; y = 64'd1; end   // full carry ripple
      mode = modes[it % 4];
      op   = alu_op_e'(it / 4 % 4);
      #1;
      unique case (op)
        ALU_ADD:   exp = ref_add(x, y, mode);
        ALU_XOR:   exp = x ^ y;
        ALU_PASSX: exp = x;
        default:   exp = y;
      endcase
      checks++;
      if (z !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%b op=%0d x=%h y=%h z=%h exp=%h", mode, op, x, y, z, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
