// ds_mcm: complete digit-serial multiple constant multiplication unit.
//
// One N-bit input x is multiplied by NT constants at once. The input is
// sign-extended (or zero-extended) and sent through a shift-adds network of
// digit-serial adders, subtracters and shared left shifts, D bits per clock
// cycle. The network needs L = ceil((bw + N) / D) cycles, bw being the bit
// width of the largest target constant. The digits of each target product c*x
// are collected in a storage block of ceil(bw_cx / D) digits, with
// bw_cx = ceil(log2 c) + N. A counter and one comparator per product stop each
// storage block once it holds its own digits. At the end every product is
// available in parallel.
//
// Default configuration: D = 1 (bit-serial), N = 16, constants 29 and 43
// realised as 7 = 8-1, 29 = 4*7+1, 43 = 2*7+29. That gives L = 22 cycles and
// products of 21 and 22 bits.
//
// Interface and timing: pulse `start` with x while `ready` is high. Digit j of
// the computation is processed j+1 cycles later. `done` pulses L+1 cycles
// after `start`, and from then on `prod[t]` holds TGT[t]'s constant times x,
// sign-extended to PW = bw + N bits (zero-extended when SIGNED_X is 0), until
// the next computation starts. `dig[t]` is the raw digit-serial product
// stream. Reset (rst_n) is active low and asynchronous. The handshake, the
// extension of the products to a common width and the comparator sense
// (shift while the count is below the digit count) are this design's choices.
module ds_mcm
  import ds_pkg::*;
#(
  parameter int unsigned D        = 1,
  parameter int unsigned N        = 16,
  parameter bit          SIGNED_X = 1'b1,
  parameter int unsigned NOPS     = 3,
  parameter aop_t [0:NOPS-1] OPS = '{
    '{u: 16'd0, l1: 16'd3, v: 16'd0, l2: 16'd0, sub: 1'b1},   //  7 = (1 << 3) - 1
    '{u: 16'd1, l1: 16'd2, v: 16'd0, l2: 16'd0, sub: 1'b0},   // 29 = (7 << 2) + 1
    '{u: 16'd1, l1: 16'd1, v: 16'd2, l2: 16'd0, sub: 1'b0}    // 43 = (7 << 1) + 29
  },
  parameter int unsigned NT       = 2,                 // number of target products
  parameter int unsigned TGT [NT] = '{2, 3},           // network node of each target
  // derived, do not override
  parameter int unsigned BW       = max_bw(),          // bit width of the largest target
  parameter int unsigned L        = mcm_latency(BW, N, D),
  parameter int unsigned PW       = BW + N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [N-1:0]          x,
  output logic                  ready,
  output logic                  busy,
  output logic                  done,
  output logic [NT-1:0][D-1:0]  dig,
  output logic [NT-1:0][PW-1:0] prod
);

  // value of network node k
  function automatic longint node_val(int k);
    longint v [NOPS+1];
    longint a, b;
    v[0] = 1;
    for (int i = 0; i < int'(NOPS); i++) begin
      a = v[int'(OPS[i].u)] << OPS[i].l1;
      b = v[int'(OPS[i].v)] << OPS[i].l2;
      v[i+1] = OPS[i].sub ? a - b : a + b;
    end
    return v[k];
  endfunction

  function automatic int max_bw();
    int m;
    m = 0;
    for (int t = 0; t < int'(NT); t++)
      if (clog2_l(node_val(int'(TGT[t])) + 1) > m) m = clog2_l(node_val(int'(TGT[t])) + 1);
    return m;
  endfunction

  // width of product t: ceil(log2 c) + N
  function automatic int bw_cx(int t);
    return clog2_l(node_val(int'(TGT[t]))) + int'(N);
  endfunction

  function automatic logic [NT-1:0][15:0] digits_vec();
    logic [NT-1:0][15:0] r;
    for (int t = 0; t < int'(NT); t++) r[t] = 16'(ceil_div(bw_cx(t), int'(D)));
    return r;
  endfunction

  localparam logic [NT-1:0][15:0] KV = digits_vec();

  logic                 init;
  logic [NT-1:0]        en;
  logic [D-1:0]         xd;
  logic [NOPS:0][D-1:0] node;

  mcm_ctrl #(.L(L), .NT(NT), .KV(KV)) u_ctrl (
    .clk, .rst_n, .start, .ready, .busy, .init, .en, .done
  );

  ds_serializer #(.D(D), .N(N), .L(L), .SIGNED_X(SIGNED_X)) u_ser (
    .clk, .rst_n, .load(start && ready), .x, .dout(xd)
  );

  ds_mcm_network #(.D(D), .NOPS(NOPS), .OPS(OPS)) u_net (
    .clk, .rst_n, .init, .x(xd), .node
  );

  for (genvar t = 0; t < int'(NT); t++) begin : g_tgt
    localparam int unsigned W = bw_cx(t);
    localparam int unsigned K = ceil_div(W, int'(D));
    logic [K*D-1:0] q;

    assign dig[t] = node[TGT[t]];

    ds_storage #(.D(D), .K(K)) u_store (
      .clk, .rst_n, .en(en[t]), .din(node[TGT[t]]), .q
    );

    assign prod[t] = SIGNED_X ? PW'($signed(q[W-1:0])) : PW'(q[W-1:0]);

    if (TGT[t] < 1 || TGT[t] > NOPS) begin : g_bad
      $error("target %0d is not a node of the network", t);
    end
  end

endmodule
