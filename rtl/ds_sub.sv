// ds_sub: digit-serial subtracter, s = a - b.
//
// Two's complement subtraction built like the digit-serial adder: the D bits
// of the subtrahend b are inverted before the full adders, and the carry
// flip-flop starts every word at 1, which supplies the +1 of the two's
// complement of b. Operands arrive least significant digit first.
//
// The structure follows the published digit-serial subtracter.
//
// Interface and timing match ds_add: s is combinational, `init` (high during
// the last digit of a word) reloads the carry flip-flop with 1 at that clock
// edge, and rst_n (active low, asynchronous) sets it to 1 as well.
module ds_sub #(
  parameter int unsigned D = 1   // digit size in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  output logic [D-1:0] s
);

  logic         cff;
  logic [D-1:0] bn;

  assign bn = ~b;

  logic cout;

  always_comb begin
    logic cy;
    cy = cff;
    for (int i = 0; i < int'(D); i++) begin
      s[i] = a[i] ^ bn[i] ^ cy;
      cy   = (a[i] & bn[i]) | (cy & (a[i] ^ bn[i]));
    end
    cout = cy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cff <= 1'b1;
    else if (init) cff <= 1'b1;
    else           cff <= cout;
  end

endmodule
