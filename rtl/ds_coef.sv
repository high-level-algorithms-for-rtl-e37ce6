// ds_coef: even and negative versions of a digit-serial constant product.
//
// The shift-adds network only produces positive odd multiples of the input.
// A coefficient such as -14 is obtained from the odd fundamental 7 by a
// digit-serial left shift (here by SH bits) followed, when NEG is 1, by a
// two's complement, done as a digit-serial subtraction from zero.
//
// That even and negative products are derived this way follows the
// published architecture; the subtraction from zero is this design's choice.
//
// Interface: a and y are D-bit digits, least significant digit first; y is
// combinational in a and the flip-flop state, so no latency is added. `init`
// (last digit of a word) and rst_n restore the initial flip-flop values.
module ds_coef #(
  parameter int unsigned D   = 1,    // digit size in bits
  parameter int unsigned SH  = 1,    // left shift in bits
  parameter bit          NEG = 1'b1  // 1: negate
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [D-1:0] a,
  output logic [D-1:0] y
);

  logic [D-1:0] shd;

  if (SH > 0) begin : g_sh
    ds_lshift #(.D(D), .LS(SH)) u_sh (.clk, .rst_n, .init, .a, .c(shd));
  end else begin : g_nosh
    assign shd = a;
  end

  if (NEG) begin : g_neg
    ds_sub #(.D(D)) u_neg (.clk, .rst_n, .init, .a('0), .b(shd), .s(y));
  end else begin : g_pos
    assign y = shd;
  end

endmodule
