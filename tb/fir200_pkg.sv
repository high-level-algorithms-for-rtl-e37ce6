// fir200_pkg: a 200-tap, 16-bit-coefficient filter for exercising ds_fir at
// the size of the larger filters the design targets, together with a
// shift-adds network for its coefficients.
//
// Coefficients: symmetric (h_k = h_(199-k)). For k <= 99, a 32-bit linear
// congruential generator (state = state * 1664525 + 1013904223, seeded with
// 12345, advanced k+1 times) gives a 15-bit magnitude (bits 22:8), scaled
// down by 2^((99-k)/5) so the taps fall off away from the centre, with the
// sign from bit 31. Zero magnitudes become 1. The sum of |h_k| stays below
// 2^19, so every output of a 16-bit input fits in 35 bits.
//
// Network: every distinct odd part c of a coefficient is built by binary
// recoding, starting from x and adding x << p for each further set bit p of
// c, one addition per bit. This is the plain digit-based recoding, not an
// area-optimised solution, but it is a valid operation list.
package fir200_pkg;
  import ds_pkg::*;

  localparam int NTAP = 200;

  function automatic int coef(int k);
    int unsigned st;
    int kk, mag;
    kk = (k < NTAP / 2) ? k : NTAP - 1 - k;
    st = 12345;
    for (int i = 0; i <= kk; i++) st = st * 1664525 + 1013904223;
    mag = int'((st >> 8) & 32'h7fff) >>> ((NTAP / 2 - 1 - kk) / 5);
    if (mag == 0) mag = 1;
    return st[31] ? -mag : mag;
  endfunction

  function automatic int odd_part(int c);
    int a;
    a = (c < 0) ? -c : c;
    while (a % 2 == 0) a = a / 2;
    return a;
  endfunction

  function automatic int popcount(int c);
    int n = 0;
    for (int b = 0; b < 31; b++) n += (c >> b) & 1;
    return n;
  endfunction

  // is tap k's odd part the first occurrence of that value
  function automatic bit first_use(int k);
    for (int j = 0; j < k; j++)
      if (odd_part(coef(j)) == odd_part(coef(k))) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int count_ops();
    int n = 0;
    for (int k = 0; k < NTAP; k++)
      if (first_use(k)) n += popcount(odd_part(coef(k))) - 1;
    return n;
  endfunction

  localparam int NOPS = count_ops();

  typedef aop_t [0:NOPS-1] ops_t;
  typedef tap_t [0:NTAP-1] taps_t;

  function automatic ops_t make_ops();
    ops_t o;
    int n, acc, c;
    n = 0;
    for (int k = 0; k < NTAP; k++) begin
      if (first_use(k)) begin
        c = odd_part(coef(k));
        acc = 0;   // node of x
        for (int p = 1; p < 31; p++) begin
          if ((c >> p) & 1) begin
            o[n] = '{u: 16'(0), l1: 16'(p), v: 16'(acc), l2: 16'd0, sub: 1'b0};
            n++;
            acc = n;
          end
        end
      end
    end
    return o;
  endfunction

  // node that holds odd part c: the last node of c's chain
  function automatic int node_of(int c);
    int n, acc, v;
    n = 0;
    for (int k = 0; k < NTAP; k++) begin
      if (first_use(k)) begin
        v = odd_part(coef(k));
        acc = 0;
        for (int p = 1; p < 31; p++)
          if ((v >> p) & 1) begin n++; acc = n; end
        if (v == c) return acc;
      end
    end
    return -1;
  endfunction

  function automatic taps_t make_taps();
    taps_t t;
    int c, a, sh;
    for (int k = 0; k < NTAP; k++) begin
      c  = coef(k);
      a  = (c < 0) ? -c : c;
      sh = 0;
      while (a % 2 == 0) begin a = a / 2; sh++; end
      t[k] = '{node: 16'(node_of(a)), sh: 16'(sh), neg: (c < 0)};
    end
    return t;
  endfunction

endpackage
