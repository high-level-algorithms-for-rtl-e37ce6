// ds_mcm_network: digit-serial shift-adds network for multiple constant
// multiplication.
//
// The network multiplies one digit-serial input x by a set of constants using
// only digit-serial additions, subtractions and left shifts. It is described
// by a list of A-operations (see ds_pkg): operation k reads two earlier nodes
// u and v, shifts them left by l1 and l2 and adds or subtracts them, giving
// node k+1; node 0 is x itself. Left shifts are shared: every node drives one
// chain of single-bit digit-serial shifters as long as the largest shift any
// operation takes from that node, and each operation taps the chain at the
// length it needs. So a node shifted by 1 and by 2 costs two flip-flops, not
// three. Each addition costs D full adders and a carry flip-flop, each
// subtraction also D inverters.
//
// The operation format, the digit-serial cells and shift sharing follow the
// published architecture; the unit-shift tap chains are this design's way
// of realising the sharing for any digit size.
//
// The default operation list is the three-operation solution for 29x and 43x
// (7 = 8-1, 29 = 4*7+1, 43 = 2*7+29), which at D = 1 gives the bit-serial
// network with five shift flip-flops. The localparams NUM_* give the
// network's gate-level cost (full adders, inverters, flip-flops).
//
// Interface: x and every node[k] are D-bit digits, least significant digit
// first. Node outputs are combinational in the digits and flip-flop state, so
// digit j of every product appears in the same cycle as digit j of x. `init`
// (last digit of a word) and rst_n return all flip-flops to their initial
// values.
module ds_mcm_network
  import ds_pkg::*;
#(
  parameter int unsigned D    = 1,
  parameter int unsigned NOPS = 3,
  parameter aop_t [0:NOPS-1] OPS = '{
    '{u: 16'd0, l1: 16'd3, v: 16'd0, l2: 16'd0, sub: 1'b1},   //  7 = (1 << 3) - 1
    '{u: 16'd1, l1: 16'd2, v: 16'd0, l2: 16'd0, sub: 1'b0},   // 29 = (7 << 2) + 1
    '{u: 16'd1, l1: 16'd1, v: 16'd2, l2: 16'd0, sub: 1'b0}    // 43 = (7 << 1) + 29
  }
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic [D-1:0]         x,
  output logic [NOPS:0][D-1:0] node
);

  // largest left shift taken from node n
  function automatic int node_mls(int n);
    int m;
    m = 0;
    for (int i = 0; i < int'(NOPS); i++) begin
      if (int'(OPS[i].u) == n && int'(OPS[i].l1) > m) m = int'(OPS[i].l1);
      if (int'(OPS[i].v) == n && int'(OPS[i].l2) > m) m = int'(OPS[i].l2);
    end
    return m;
  endfunction

  function automatic int count_sub();
    int c;
    c = 0;
    for (int i = 0; i < int'(NOPS); i++) c += int'(OPS[i].sub);
    return c;
  endfunction

  function automatic int count_shift_ff();
    int c;
    c = 0;
    for (int n = 0; n <= int'(NOPS); n++) c += node_mls(n);
    return c;
  endfunction

  // Gate-level cost of the network, for area estimates: full adders,
  // inverters, carry flip-flops and shift flip-flops.
  localparam int NUM_SUB      = count_sub();
  localparam int NUM_ADD      = int'(NOPS) - NUM_SUB;
  localparam int NUM_FA       = int'(NOPS) * int'(D);
  localparam int NUM_INV      = NUM_SUB * int'(D);
  localparam int NUM_CARRY_FF = int'(NOPS);
  localparam int NUM_SHIFT_FF = count_shift_ff();

  // Node n lives in g_node[n]: t[s] is node n shifted left by s bits.
  for (genvar n = 0; n <= int'(NOPS); n++) begin : g_node
    localparam int MLS = node_mls(n);
    logic [D-1:0] t [MLS+1];
    if (n == 0) begin : g_in
      assign t[0] = x;
    end else begin : g_res
      assign t[0] = g_op[n-1].w;
    end
    assign node[n] = t[0];
    for (genvar s = 1; s <= MLS; s++) begin : g_sh
      ds_lshift #(.D(D), .LS(1)) u_sh (
        .clk, .rst_n, .init, .a(t[s-1]), .c(t[s])
      );
    end
  end

  for (genvar k = 0; k < int'(NOPS); k++) begin : g_op
    localparam int U  = int'(OPS[k].u);
    localparam int V  = int'(OPS[k].v);
    localparam int L1 = int'(OPS[k].l1);
    localparam int L2 = int'(OPS[k].l2);
    logic [D-1:0] w;
    if (U > k || V > k) begin : g_bad
      $error("operation %0d reads a node that is not yet computed", k);
    end
    if (OPS[k].sub) begin : g_sub
      ds_sub #(.D(D)) u_sub (
        .clk, .rst_n, .init, .a(g_node[U].t[L1]), .b(g_node[V].t[L2]), .s(w)
      );
    end else begin : g_add
      ds_add #(.D(D)) u_add (
        .clk, .rst_n, .init, .a(g_node[U].t[L1]), .b(g_node[V].t[L2]), .s(w)
      );
    end
  end

endmodule
