// tb_fir_200: runs ds_fir with a 200-tap filter of 16-bit coefficients
// (fir200_pkg), a 16-bit input and a 35-bit output, bit-serially (35 cycles
// per sample) and with 8-bit digits (5 cycles per sample). Every output is
// compared with y(n) = sum_k h_k x(n-k) worked out here, including outputs
// fed by full-scale inputs, and the sample period and output latency are
// checked.
module tb_fir_200;
  import fir200_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] dn;
  tb_fir200_run #(.D(1), .NSAMPLE(260)) r0 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[0]));
  tb_fir200_run #(.D(8), .NSAMPLE(260)) r1 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[1]));

  initial begin
    longint s = 0;
    for (int k = 0; k < NTAP; k++) s += (coef(k) < 0) ? -coef(k) : coef(k);
    $display("200-tap filter: %0d network operations, sum of |h| = %0d", NOPS, s);
    checks++;
    if (s * 32768 >= (longint'(1) << 34)) begin
      failures++;
      $display("coefficients too large for a 35-bit output");
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&dn);
    checks   += r0.checks + r1.checks;
    failures += r0.fails + r1.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
