// ds_word_delay: one-sample delay of a digit-serial word (the delay elements
// between the structural adders of a transposed-form FIR filter).
//
// A word of P digits passes through a chain of P digit registers, so every
// digit leaves exactly one word period (P clock cycles) after it entered and
// the word boundaries stay aligned with the rest of the datapath. Unlike the
// shift flip-flops, these registers are not cleared at word boundaries: they
// carry the partial sum from one sample to the next.
//
// Interface: din and dout are D-bit digits; dout = din delayed P cycles.
// rst_n (active low, asynchronous) clears the chain, i.e. the filter starts
// from an all-zero state.
module ds_word_delay #(
  parameter int unsigned D = 1,   // digit size in bits
  parameter int unsigned P = 35   // digits per word
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [D-1:0] din,
  output logic [D-1:0] dout
);

  logic [D-1:0] r [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(P); i++) r[i] <= '0;
    end else begin
      r[0] <= din;
      for (int i = 1; i < int'(P); i++) r[i] <= r[i-1];
    end
  end

  assign dout = r[P-1];

endmodule
