// ds_lshift: digit-serial left shift by LS bit positions.
//
// In digit-serial arithmetic a shift is no longer free wiring: it delays bits
// into later digits. The shifter is organised in D horizontal layers, one per
// bit of the digit. Input bit a[i] leaves on output bit c[(i+LS) mod D] after
// a chain of flip-flops whose length is floor(LS/D) when
// i < D - (LS mod D) and ceil(LS/D) otherwise, so the whole shifter uses
// exactly LS flip-flops. Layers with no flip-flop are plain wires.
//
// The layer routing and flip-flop counts follow the published digit-serial
// shift; the word-boundary clearing is this design's mechanism for the
// flip-flops' initial value of 0.
//
// Interface: a and c are D-bit digits, least significant digit first. All
// flip-flops start every word at 0 (the zeros shifted into the low end of the
// result): `init`, high during the last digit of a word, clears them on that
// clock edge, and rst_n (active low, asynchronous) clears them too.
module ds_lshift #(
  parameter int unsigned D  = 1,  // digit size in bits
  parameter int unsigned LS = 1   // shift amount in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [D-1:0] a,
  output logic [D-1:0] c
);

  for (genvar i = 0; i < int'(D); i++) begin : g_layer
    localparam int unsigned NF = (i < int'(D - (LS % D))) ? (LS / D) : ((LS + D - 1) / D);
    localparam int unsigned J  = (i + LS) % D;
    if (NF == 0) begin : g_wire
      assign c[J] = a[i];
    end else begin : g_ff
      logic [NF-1:0] sr;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)    sr <= '0;
        else if (init) sr <= '0;
        else           sr <= (sr << 1) | NF'(a[i]);
      end
      assign c[J] = sr[NF-1];
    end
  end

endmodule
