// ds_add: digit-serial adder.
//
// Adds two digit-serial operands that arrive least significant digit first,
// D bits per clock cycle. D full adders form a ripple chain inside the digit
// and a single flip-flop carries the carry out of the most significant full
// adder into the least significant one of the next digit, as in the classic
// digit-serial adder. The carry flip-flop starts each word at 0.
//
// The structure follows the published digit-serial adder; the init and
// reset mechanism is this design's own.
//
// Interface: a, b and s are D-bit digits; s is combinational in a, b and the
// stored carry, so the adder adds no latency. `init` is high during the last
// digit of a word: on that clock edge the carry flip-flop is loaded with 0
// instead of the carry out, so the next word starts clean. rst_n (active low,
// asynchronous) also clears it. The word-boundary `init` signal and the reset
// style are this design's choices.
module ds_add #(
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

  logic cout;

  always_comb begin
    logic cy;
    cy = cff;
    for (int i = 0; i < int'(D); i++) begin
      s[i] = a[i] ^ b[i] ^ cy;
      cy   = (a[i] & b[i]) | (cy & (a[i] ^ b[i]));
    end
    cout = cy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cff <= 1'b0;
    else if (init) cff <= 1'b0;
    else           cff <= cout;
  end

endmodule
