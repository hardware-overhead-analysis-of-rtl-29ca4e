// pi_ref_pkg: reference model of the 64-bit Pi-cipher * operation and of a
// Pi-cipher round, written straight from the equations, for the testbenches.
package pi_ref_pkg;

  typedef logic [63:0] w64_t;
  typedef w64_t [3:0]  q4_t;

  function automatic w64_t rotl(w64_t v, int n);
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic q4_t star(q4_t x, q4_t y);
    w64_t t0, t1, t2, t3, t4, t5, t6, t7, t8, t9, t10, t11;
    q4_t  z;
    t0 = rotl(64'hF0E8E4E2E1D8D4D2 + x[0] + x[1] + x[2], 7);
    t1 = rotl(64'hD1CCCAC9C6C5C3B8 + x[0] + x[1] + x[3], 19);
    t2 = rotl(64'hB4B2B1ACAAA9A6A5 + x[0] + x[2] + x[3], 31);
    t3 = rotl(64'hA39C9A999695938E + x[1] + x[2] + x[3], 53);
    t4 = t0 ^ t1 ^ t3;
    t5 = t0 ^ t1 ^ t2;
    t6 = t1 ^ t2 ^ t3;
    t7 = t0 ^ t2 ^ t3;
    t0 = rotl(64'h8D8B87787472716C + y[0] + y[2] + y[3], 11);
    t1 = rotl(64'h6A696665635C5A59 + y[1] + y[2] + y[3], 23);
    t2 = rotl(64'h5655534E4D4B473C + y[0] + y[1] + y[2], 37);
    t3 = rotl(64'h3A393635332E2D2B + y[0] + y[1] + y[3], 59);
    t8  = t1 ^ t2 ^ t3;
    t9  = t0 ^ t2 ^ t3;
    t10 = t0 ^ t1 ^ t3;
    t11 = t0 ^ t1 ^ t2;
    z[3] = t4 + t8;
    z[0] = t5 + t9;
    z[1] = t6 + t10;
    z[2] = t7 + t11;
    return z;
  endfunction

  // One round: J0 = CI*I0, Jn = J(n-1)*In; K3 = J3*CR, Kn = Jn*K(n+1).
  function automatic void round(input q4_t i [4], input q4_t ci, input q4_t cr, output q4_t k [4]);
    q4_t j [4];
    j[0] = star(ci, i[0]);
    for (int n = 1; n < 4; n++) j[n] = star(j[n-1], i[n]);
    k[3] = star(j[3], cr);
    for (int n = 2; n >= 0; n--) k[n] = star(j[n], k[n+1]);
  endfunction

  function automatic q4_t rand_q4();
    q4_t q;
    for (int n = 0; n < 4; n++) q[n] = {$urandom, $urandom};
    return q;
  endfunction

endpackage
