// ds_fir: digit-serial FIR filter in transposed form with a shift-adds
// multiplier block.
//
// y(n) = sum_k h_k * x(n-k). The input sample is multiplied by every
// coefficient at once in a multiplier block: a digit-serial shift-adds network
// makes the positive odd fundamentals and a ds_coef stage per tap gives each
// coefficient its power-of-two factor and sign. The tap products then run
// through the transposed-form chain: the product of h_(NTAP-1) passes a
// one-sample delay, h_(NTAP-2)'s product is added to it in a digit-serial
// adder, the sum passes the next delay, and so on down to h_0. The last adder
// gives y(n).
//
// Every word (input sample, tap product, partial sum and output) is
// P = ceil(WOUT / D) digits long, so that the WOUT-bit output fits. The input
// is sign-extended to P*D bits. One sample is accepted every P clock cycles.
// Word boundaries come from a free-running digit counter. In the last digit
// cycle of each word every carry and shift flip-flop is returned to its
// initial value; the one-sample delays are not.
//
// Default configuration: D = 1, N = 16, WOUT = 35 (35 cycles per sample). The
// default coefficients h = {-14, 29, 43, 29, -14} are built from the
// fundamentals 7, 29 and 43 of the default network. They are a small example
// set, not a designed filter response.
//
// Interface and timing: x_in is sampled on the clock edge that ends a cycle
// with x_take high, once every P cycles. y_dig is the digit-serial output. Its
// digit j appears j+1 cycles after that edge. y_out (signed, WOUT bits) is
// updated, and y_valid pulses, P+2 cycles after the x_take cycle of the
// newest sample it includes. Reset (rst_n) is active low and asynchronous and
// clears the filter state.
module ds_fir
  import ds_pkg::*;
#(
  parameter int unsigned D    = 1,
  parameter int unsigned N    = 16,
  parameter int unsigned WOUT = 35,
  parameter int unsigned NOPS = 3,
  parameter aop_t [0:NOPS-1] OPS = '{
    '{u: 16'd0, l1: 16'd3, v: 16'd0, l2: 16'd0, sub: 1'b1},   //  7 = (1 << 3) - 1
    '{u: 16'd1, l1: 16'd2, v: 16'd0, l2: 16'd0, sub: 1'b0},   // 29 = (7 << 2) + 1
    '{u: 16'd1, l1: 16'd1, v: 16'd2, l2: 16'd0, sub: 1'b0}    // 43 = (7 << 1) + 29
  },
  parameter int unsigned NTAP = 5,
  parameter tap_t [0:NTAP-1] TAPS = '{
    '{node: 16'd1, sh: 16'd1, neg: 1'b1},   // h0 = -14
    '{node: 16'd2, sh: 16'd0, neg: 1'b0},   // h1 =  29
    '{node: 16'd3, sh: 16'd0, neg: 1'b0},   // h2 =  43
    '{node: 16'd2, sh: 16'd0, neg: 1'b0},   // h3 =  29
    '{node: 16'd1, sh: 16'd1, neg: 1'b1}    // h4 = -14
  },
  // derived, do not override
  parameter int unsigned P    = ceil_div(int'(WOUT), int'(D))
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           x_in,
  output logic                   x_take,
  output logic [D-1:0]           y_dig,
  output logic signed [WOUT-1:0] y_out,
  output logic                   y_valid
);

  localparam int unsigned CW = (P > 1) ? $clog2(P) : 1;

  logic [CW-1:0]        cnt;
  logic                 init;
  logic [D-1:0]         xd;
  logic [NOPS:0][D-1:0] node;
  logic [D-1:0]         prod [NTAP];
  logic [D-1:0]         acc  [NTAP];
  logic [D-1:0]         dly  [NTAP];
  logic [P*D-1:0]       q;

  // digit counter: cnt = j in the cycle that carries digit j of a word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (init) cnt <= '0;
    else           cnt <= cnt + 1'b1;
  end

  assign init   = (cnt == CW'(P - 1));
  assign x_take = init;

  ds_serializer #(.D(D), .N(N), .L(P), .SIGNED_X(1'b1)) u_ser (
    .clk, .rst_n, .load(init), .x(x_in), .dout(xd)
  );

  // multiplier block
  ds_mcm_network #(.D(D), .NOPS(NOPS), .OPS(OPS)) u_net (
    .clk, .rst_n, .init, .x(xd), .node
  );

  for (genvar k = 0; k < int'(NTAP); k++) begin : g_tap
    ds_coef #(.D(D), .SH(int'(TAPS[k].sh)), .NEG(TAPS[k].neg)) u_coef (
      .clk, .rst_n, .init, .a(node[TAPS[k].node]), .y(prod[k])
    );
    if (k == int'(NTAP) - 1) begin : g_first
      assign dly[k] = '0;
      assign acc[k] = prod[k];
    end else begin : g_add
      ds_word_delay #(.D(D), .P(P)) u_dly (.clk, .rst_n, .din(acc[k+1]), .dout(dly[k]));
      ds_add #(.D(D)) u_add (.clk, .rst_n, .init, .a(prod[k]), .b(dly[k]), .s(acc[k]));
    end
  end

  assign y_dig = acc[0];

  // digit-serial to parallel conversion of the output
  ds_storage #(.D(D), .K(P)) u_store (.clk, .rst_n, .en(1'b1), .din(acc[0]), .q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= (cnt == '0);
      if (cnt == '0) y_out <= $signed(q[WOUT-1:0]);
    end
  end

endmodule
