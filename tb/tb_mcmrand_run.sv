// tb_mcmrand_run: runs ds_mcm on a random set of NC distinct odd constants of
// up to BITS bits, the kind of instance used to compare MCM algorithms.
//
// Constants: a 32-bit linear congruential generator
// (state = state * 1664525 + 1013904223, seeded with SEED) gives BITS-bit
// values (bits 30:31-BITS of the state). Bit 0 is forced to 1, and values of
// 1 or repeats are skipped.
//
// Network: every constant is built on its own from its canonical signed-digit
// (CSD) form, most significant digit first: node = (node << gap) +/- x for
// each further nonzero digit. This is a valid operation list with
// subtractions, not an area-optimised one.
//
// Checks every product of NCOMP computations (random, full-scale and extreme
// inputs) against c*x and checks that done arrives
// ceil((bw + 16) / D) + 1 cycles after start. Used by tb_mcm_random.
module tb_mcmrand_run
  import ds_pkg::*;
#(
  parameter int D     = 1,
  parameter int BITS  = 12,
  parameter int NC    = 10,
  parameter int SEED  = 1,
  parameter int NCOMP = 12
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   fails_o,
  output logic done_o
);
  localparam int N = 16;

  typedef int          cvec_t [NC];
  typedef int unsigned tvec_t [NC];

  function automatic cvec_t make_consts();
    cvec_t c;
    int unsigned st;
    int n, v;
    bit dup;
    st = SEED;
    n  = 0;
    while (n < NC) begin
      st = st * 1664525 + 1013904223;
      v  = int'(st >> (31 - BITS)) & ((1 << BITS) - 1);
      v  = v | 1;
      dup = (v == 1);
      for (int j = 0; j < n; j++) if (c[j] == v) dup = 1'b1;
      if (!dup) begin
        c[n] = v;
        n++;
      end
    end
    return c;
  endfunction

  localparam cvec_t C = make_consts();

  // CSD digit of c at position p (-1, 0 or +1)
  function automatic int csd_digit(int c, int p);
    int v, d;
    v = c;
    for (int i = 0; i <= p; i++) begin
      d = (v % 2 == 0) ? 0 : 2 - (v % 4);
      if (i == p) return d;
      v = (v - d) / 2;
    end
    return 0;
  endfunction

  function automatic int csd_top(int c);
    int t = 0;
    for (int p = 0; p <= BITS + 1; p++) if (csd_digit(c, p) != 0) t = p;
    return t;
  endfunction

  function automatic int count_ops();
    int n = 0;
    for (int k = 0; k < NC; k++)
      for (int p = 0; p < csd_top(C[k]); p++) if (csd_digit(C[k], p) != 0) n++;
    return n;
  endfunction

  localparam int NOPS = count_ops();

  typedef aop_t [0:NOPS-1] ops_t;

  function automatic ops_t make_ops();
    ops_t o;
    int n, acc, prev;
    n = 0;
    for (int k = 0; k < NC; k++) begin
      acc  = 0;
      prev = csd_top(C[k]);
      for (int p = prev - 1; p >= 0; p--) begin
        if (csd_digit(C[k], p) != 0) begin
          o[n] = '{u: 16'(acc), l1: 16'(prev - p), v: 16'd0, l2: 16'd0,
                   sub: (csd_digit(C[k], p) < 0)};
          n++;
          acc  = n;
          prev = p;
        end
      end
    end
    return o;
  endfunction

  // node of constant k: the last node of its chain
  function automatic tvec_t make_tgt();
    tvec_t t;
    int n;
    n = 0;
    for (int k = 0; k < NC; k++) begin
      for (int p = 0; p < csd_top(C[k]); p++) if (csd_digit(C[k], p) != 0) n++;
      t[k] = n;
    end
    return t;
  endfunction

  localparam ops_t  OPS = make_ops();
  localparam tvec_t TGT = make_tgt();

  function automatic int max_bits();
    int m = 0;
    for (int k = 0; k < NC; k++) if (clog2_l(longint'(C[k]) + 1) > m) m = clog2_l(longint'(C[k]) + 1);
    return m;
  endfunction

  localparam int BWM = max_bits();
  localparam int PW  = BWM + N;
  localparam int L   = (BWM + N + D - 1) / D;

  int checks = 0, fails = 0;

  logic                 start, ready, busy, done;
  logic [N-1:0]         x;
  logic [NC-1:0][D-1:0] dig;
  logic [NC-1:0][PW-1:0] prod;

  ds_mcm #(.D(D), .N(N), .NOPS(NOPS), .OPS(OPS), .NT(NC), .TGT(TGT)) dut (
    .clk, .rst_n, .start, .x, .ready, .busy, .done, .dig, .prod
  );

  assign checks_o = checks;
  assign fails_o  = fails;

  task automatic check(input string what, input int k, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      fails++;
      if (fails < 10)
        $display("BITS=%0d NC=%0d D=%0d %s %0d: got %0d expected %0d",
                 BITS, NC, D, what, k, got, exp);
    end
  endtask

  initial begin
    longint xv;
    int cyc;
    done_o = 0; start = 0; x = '0;
    $display("random set BITS=%0d NC=%0d: %0d operations, bw=%0d, %0d cycles per product set",
             BITS, NC, NOPS, BWM, L);
    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < NCOMP; n++) begin
      @(negedge clk);
      x = 16'($urandom);
      if (n == 0) x = 16'h8000;
      if (n == 1) x = 16'h7fff;
      if (n == 2) x = 16'hffff;
      xv = longint'($signed(x));
      check("ready", 0, ready, 1);
      start = 1;
      @(negedge clk);
      start = 0;
      x = 16'($urandom);
      cyc = 1;
      while (!done && cyc < 200) begin
        @(negedge clk);
        cyc++;
      end
      check("latency", 0, cyc, L + 1);
      for (int k = 0; k < NC; k++)
        check("product", k, longint'($signed(prod[k])), longint'(C[k]) * xv);
    end
    @(negedge clk);
    done_o = 1;
  end
endmodule
