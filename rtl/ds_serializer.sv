// ds_serializer: turns a bit-parallel input word into a digit-serial stream.
//
// The N-bit word x is extended to D*L bits, with sign bits when SIGNED_X is 1
// and zeros otherwise, and sent out least significant digit first, D bits per
// clock cycle, so that every operation downstream sees a word long enough to
// hold its full result. After the last digit the register keeps shifting in
// extension bits.
//
// Timing: `load` captures x on a clock edge; digit 0 is on `dout` in the
// following cycle, digit j j cycles later. rst_n (active low, asynchronous)
// clears the register. The register-based structure is this design's choice.
module ds_serializer #(
  parameter int unsigned D        = 1,   // digit size in bits
  parameter int unsigned N        = 16,  // input word width
  parameter int unsigned L        = 22,  // digits per word
  parameter bit          SIGNED_X = 1'b1 // 1: sign-extend, 0: zero-extend
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] x,
  output logic [D-1:0] dout
);

  localparam int unsigned W = (D * L > N) ? D * L : N;

  logic [W-1:0] sh;
  logic         ext;

  assign ext  = SIGNED_X & sh[W-1];
  assign dout = sh[D-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sh <= '0;
    else if (load) sh <= SIGNED_X ? W'($signed(x)) : W'(x);
    else           sh <= W'({{D{ext}}, sh} >> D);
  end

endmodule
