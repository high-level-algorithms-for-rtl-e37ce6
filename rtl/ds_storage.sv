// ds_storage: digit-serial to bit-parallel conversion of one product.
//
// D layers of K cascaded flip-flops (D*K flip-flops in all) form a shift
// register one digit wide. Each enabled clock edge shifts the incoming digit
// in at the top; after K enabled edges the first digit received (the least
// significant one) sits at the far end, so q holds the product with digit j
// in bits [j*D +: D].
//
// The layered shift register follows the published storage circuit; the
// enable input is how this design applies the counter control to it.
//
// Interface: `en` shifts `din` in on the clock edge; q is the register
// content. rst_n (active low, asynchronous) clears it to 0.
module ds_storage #(
  parameter int unsigned D = 1,   // digit size in bits
  parameter int unsigned K = 21   // number of digits stored
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [D-1:0]   din,
  output logic [K*D-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= (K*D)'({din, q} >> D);
  end

endmodule
