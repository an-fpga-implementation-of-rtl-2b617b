// tb_rsc_pkg: reference model of the 8-state RSC code for the testbenches,
// written as a shift register (feedback 1 + D + D^3, parity 1 + D + D^2 + D^3)
// independently of the decoder's trellis functions, plus reference max-log
// arithmetic.
package tb_rsc_pkg;
  typedef struct { bit r1, r2, r3; } rsc_t;   // r1 = newest

  function automatic int st(rsc_t r);
    return int'(r.r1) + 2 * int'(r.r2) + 4 * int'(r.r3);
  endfunction

  function automatic rsc_t from_int(int s);
    rsc_t r;
    r.r1 = s[0]; r.r2 = s[1]; r.r3 = s[2];
    return r;
  endfunction

  // one bit: returns parity, updates the register
  function automatic bit step(ref rsc_t r, input bit u);
    bit a, p;
    a = u ^ r.r1 ^ r.r3;
    p = a ^ r.r1 ^ r.r2 ^ r.r3;
    r.r3 = r.r2; r.r2 = r.r1; r.r1 = a;
    return p;
  endfunction

  function automatic int satv(int v, int w);
    int hi = (1 << (w - 1)) - 1;
    int lo = -(1 << (w - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction
endpackage
