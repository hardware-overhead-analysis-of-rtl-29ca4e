// pi_pkg: constants of the Pi-cipher "*" operation for 64-bit words.
//
// The * operation takes two 4-word inputs X and Y.  The mu transformation of
// X adds a constant and three of the X words, rotates the sum left and mixes
// the four results with three-input XORs; the nu transformation does the same
// for Y with other constants, word choices and rotation amounts; the sigma
// step adds the two results word by word.  The constants, rotation amounts
// and word selections below are those of the 64-bit operation.
package pi_pkg;

  localparam int unsigned W = 64;         // word width

  typedef logic [W-1:0] word_t;
  typedef word_t [3:0]  quad_t;           // four words, index = word number

  localparam word_t MU_C [4] = '{64'hF0E8E4E2E1D8D4D2, 64'hD1CCCAC9C6C5C3B8,
                                 64'hB4B2B1ACAAA9A6A5, 64'hA39C9A999695938E};
  localparam word_t NU_C [4] = '{64'h8D8B87787472716C, 64'h6A696665635C5A59,
                                 64'h5655534E4D4B473C, 64'h3A393635332E2D2B};
  localparam int unsigned MU_R [4] = '{7, 19, 31, 53};
  localparam int unsigned NU_R [4] = '{11, 23, 37, 59};

  // Word left out of each step-1 sum (T_k adds the other three words).
  localparam int unsigned MU_SKIP [4] = '{3, 2, 1, 0};
  localparam int unsigned NU_SKIP [4] = '{1, 0, 3, 2};

  // Step-2 XOR: output k is the XOR of the three T's other than XSKIP[k].
  // mu: T4 = T0^T1^T3, T5 = T0^T1^T2, T6 = T1^T2^T3, T7 = T0^T2^T3.
  // nu: T8 = T1^T2^T3, T9 = T0^T2^T3, T10 = T0^T1^T3, T11 = T0^T1^T2.
  localparam int unsigned MU_XSKIP [4] = '{2, 3, 0, 1};
  localparam int unsigned NU_XSKIP [4] = '{0, 1, 2, 3};

endpackage
