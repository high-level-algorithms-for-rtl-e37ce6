// ds_top: digit-serial shift-adds constant multiplication, two uses side by
// side.
//
//  * mcm_*: a stand-alone MCM unit (ds_mcm). One 16-bit input is multiplied
//    by the constants 29 and 43 through a bit-serial shift-adds network that
//    shares the partial product 7x and its shifts. A counter-controlled
//    storage turns both products into parallel words after 22 cycles.
//  * fir_*: a transposed-form digit-serial FIR filter (ds_fir). Its
//    multiplier block is the same kind of network, and its structural adders
//    and sample delays are digit-serial too. One sample every 35 cycles, with a
//    35-bit output.
//
// Both run on the same clock and reset (active low, asynchronous) and share
// nothing else. Every parameter is at its default; see ds_mcm and ds_fir for
// their interfaces and timing.
module ds_top (
  input  logic               clk,
  input  logic               rst_n,
  // MCM unit
  input  logic               mcm_start,
  input  logic [15:0]        mcm_x,
  output logic               mcm_ready,
  output logic               mcm_busy,
  output logic               mcm_done,
  output logic [1:0][0:0]    mcm_dig,
  output logic [1:0][21:0]   mcm_prod,
  // FIR filter
  input  logic [15:0]        fir_x,
  output logic               fir_x_take,
  output logic [0:0]         fir_y_dig,
  output logic signed [34:0] fir_y,
  output logic               fir_y_valid
);

  ds_mcm u_mcm (
    .clk, .rst_n, .start(mcm_start), .x(mcm_x), .ready(mcm_ready), .busy(mcm_busy),
    .done(mcm_done), .dig(mcm_dig), .prod(mcm_prod)
  );

  ds_fir u_fir (
    .clk, .rst_n, .x_in(fir_x), .x_take(fir_x_take), .y_dig(fir_y_dig),
    .y_out(fir_y), .y_valid(fir_y_valid)
  );

endmodule
