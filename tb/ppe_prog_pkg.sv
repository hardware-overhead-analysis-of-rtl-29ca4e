// ppe_prog_pkg: instruction builder and a PPE program for the 64-bit
// Pi-cipher * operation, for the testbenches.
//
// Coefficient RAM map of the program: 0..3 X, 4..7 Y, 8..15 the constants
// of T0..T3 (mu) and T0..T3 (nu), 16..19 and 20..23 the rotated sums of mu
// and nu, 24..27 T4..T7, 28..31 T8..T11, 32..35 Z0..Z3.  The first 16
// instructions write the external input into addresses 0..15 (X, Y, then the
// constants); the last four produce Z3, Z0, Z1, Z2 on the element's output.
// round_program chains eight such operations into a whole Pi-cipher round.
package ppe_prog_pkg;
  import ppe_pkg::*;

  function automatic ppe_instr_t mk(logic [1:0] io, logic [10:0] rmode, logic [3:0] rc,
                                    logic [1:0] acc, logic [2:0] amode, alu_op_e op,
                                    logic [1:0] rw, int aw, int ab, int aa);
    ppe_instr_t i;
    i.io = io;  i.rot_mode = rmode;
    i.rc3 = rc; i.rc2 = rc; i.rc1 = rc; i.rc0 = rc;
    i.acc = acc; i.alu_mode = amode; i.alu_op = op;
    i.rw = rw; i.addrw = 6'(aw); i.addrb = 6'(ab); i.addra = 6'(aa);
    return i;
  endfunction

  // write the external input word to address a
  function automatic ppe_instr_t ld(int a);
    return mk(2'b10, 11'd0, 4'd0, 2'b00, ALU_MODE_64, ALU_ADD, 2'b10, a, 0, 0);
  endfunction

  // 64-bit rotate-left by n, expressed as a right rotation by 64-n
  function automatic ppe_instr_t rotl64(int n, int src, int dst);
    int r;
    logic [10:0] md;
    r = 64 - n;
    case (r / 16)
      0: md = ROT_64_R0;
      1: md = ROT_64_R16;
      2: md = ROT_64_R32;
      default: md = ROT_64_R48;
    endcase
    return mk(2'b01, md, 4'(r % 16), 2'b00, ALU_MODE_64, ALU_ADD, 2'b11, dst, src, 0);
  endfunction

  localparam int NBODY = 8*4 + 8*2 + 4;     // instructions of one * operation
  localparam int NPROG = 16 + NBODY;

  // One * operation: X at xb..xb+3, Y at yb..yb+3, the eight constants at
  // cb..cb+7, sixteen temporaries at tb..tb+15, Z written to zb..zb+3.
  function automatic void star_body(int xb, int yb, int cb, int tb, int zb, ref ppe_instr_t q [$]);
    int a0, a1, a2;
    int rot [8] = '{7, 19, 31, 53, 11, 23, 37, 59};
    int sk  [8] = '{3, 2, 1, 0, 1, 0, 3, 2};
    int xk  [8] = '{2, 3, 0, 1, 0, 1, 2, 3};
    for (int t = 0; t < 8; t++) begin        // step 1, mu then nu
      int base;
      base = (t < 4) ? xb : yb;
      a0 = -1; a1 = -1; a2 = -1;
      for (int j = 0; j < 4; j++) if (j != sk[t]) begin
        if (a0 < 0) a0 = base + j; else if (a1 < 0) a1 = base + j; else a2 = base + j;
      end
      q.push_back(mk(2'b00, 11'd0, 4'd0, 2'b01, ALU_MODE_64, ALU_ADD, 2'b01, 0, a0, cb + t));
      q.push_back(mk(2'b00, 11'd0, 4'd0, 2'b11, ALU_MODE_64, ALU_ADD, 2'b01, 0, 0, a1));
      q.push_back(mk(2'b00, 11'd0, 4'd0, 2'b10, ALU_MODE_64, ALU_ADD, 2'b11, tb + t, 0, a2));
      q.push_back(rotl64(rot[t], tb + t, tb + t));
    end
    for (int t = 0; t < 8; t++) begin        // step 2
      int base;
      base = (t < 4) ? tb : tb + 4;
      a0 = -1; a1 = -1; a2 = -1;
      for (int j = 0; j < 4; j++) if (j != xk[t]) begin
        if (a0 < 0) a0 = base + j; else if (a1 < 0) a1 = base + j; else a2 = base + j;
      end
      q.push_back(mk(2'b00, 11'd0, 4'd0, 2'b01, ALU_MODE_64, ALU_XOR, 2'b01, 0, a1, a0));
      q.push_back(mk(2'b00, 11'd0, 4'd0, 2'b10, ALU_MODE_64, ALU_XOR, 2'b11, tb + 8 + t, 0, a2));
    end
    for (int k = 0; k < 4; k++)              // sigma: Z[(k+3)%4] = T(4+k) + T(8+k)
      q.push_back(mk(2'b00, 11'd0, 4'd0, 2'b00, ALU_MODE_64, ALU_ADD, 2'b11, zb + (k + 3) % 4, tb + 12 + k, tb + 8 + k));
  endfunction

  // The * operation with its operand loads, for the map given above.
  function automatic void star_program(output ppe_instr_t p [NPROG]);
    ppe_instr_t q [$];
    for (int a = 0; a < 16; a++) q.push_back(ld(a));
    star_body(0, 4, 8, 16, 32, q);
    for (int n = 0; n < NPROG; n++) p[n] = q[n];
  endfunction

  // A whole Pi-cipher round.  Map: I0..I3 at 0..15 (each Kn later replaces
  // In), CI at 16..19, CR at 20..23, constants at 24..31, J0..J3 at 32..47,
  // temporaries at 48..63.  The first 32 instructions load I0..I3, CI, CR
  // and the constants, in that order, from the external input; the last
  // four instructions of each * operation output its Z words.
  localparam int NROUND = 32 + 8 * NBODY;
  function automatic void round_program(ref ppe_instr_t q [$]);
    q.delete();
    for (int a = 0; a < 32; a++) q.push_back(ld(a));
    star_body(16, 0, 24, 48, 32, q);                               // J0 = CI * I0
    for (int n = 1; n < 4; n++) star_body(32 + 4*(n-1), 4*n, 24, 48, 32 + 4*n, q);
    star_body(32 + 12, 20, 24, 48, 12, q);                         // K3 = J3 * CR
    for (int n = 2; n >= 0; n--) star_body(32 + 4*n, 4*(n+1), 24, 48, 4*n, q);
  endfunction

endpackage
