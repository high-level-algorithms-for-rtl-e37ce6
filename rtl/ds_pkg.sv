// ds_pkg: types and elaboration-time helpers shared by the digit-serial
// multiple-constant-multiplication (MCM) blocks.
//
// A shift-adds MCM network is described as a list of A-operations. Node 0 of
// the network is the input x (the constant 1); operation k produces node k+1:
//     node[k+1] = (node[u] << l1) + node[v] << l2      when sub = 0
//     node[k+1] = (node[u] << l1) - node[v] << l2      when sub = 1
// The right shift of the general A-operation is always zero here, because
// the digit-serial realisation only uses operations without a right shift.
// A filter tap takes one network node, shifts it left and optionally negates
// it, which is how even and negative coefficients are obtained from the
// positive odd fundamentals.
package ds_pkg;

  typedef struct packed {
    logic [15:0] u;    // node index of the first operand
    logic [15:0] l1;   // left shift of the first operand
    logic [15:0] v;    // node index of the second operand
    logic [15:0] l2;   // left shift of the second operand
    logic       sub;  // 1: subtract the second operand
  } aop_t;

  typedef struct packed {
    logic [15:0] node; // network node that holds the odd fundamental
    logic [15:0] sh;   // left shift applied to it
    logic       neg;  // 1: two's complement of the shifted value
  } tap_t;

  function automatic int ceil_div(int a, int b);
    return (a + b - 1) / b;
  endfunction

  // Latency of one MCM computation in clock cycles, ceil((bw + N) / d).
  function automatic int mcm_latency(int bw, int n, int d);
    return ceil_div(bw + n, d);
  endfunction

  // ceil(log2(c)) for c >= 1
  function automatic int clog2_l(longint c);
    int r;
    longint p;
    r = 0;
    p = 1;
    while (p < c) begin
      p = p << 1;
      r++;
    end
    return r;
  endfunction

endpackage
