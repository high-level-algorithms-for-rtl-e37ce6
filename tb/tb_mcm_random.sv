// tb_mcm_random: MCM instances of random constants, bit-serial (D = 1) with a
// 16-bit input: sets of 10 and 50 distinct odd 12-bit constants and of 10 and
// 30 distinct odd 16-bit constants. Every product of every computation is
// checked (see tb_mcmrand_run). Larger sets work the same way but take
// minutes to elaborate.
module tb_mcm_random;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] dn;
  tb_mcmrand_run #(.D(1), .BITS(12), .NC(10),  .SEED(11)) r0 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[0]));
  tb_mcmrand_run #(.D(1), .BITS(12), .NC(50),  .SEED(12)) r1 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[1]));
  tb_mcmrand_run #(.D(1), .BITS(16), .NC(10),  .SEED(13)) r2 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[2]));
  tb_mcmrand_run #(.D(1), .BITS(16), .NC(30),  .SEED(14)) r3 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[3]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&dn);
    checks   += r0.checks + r1.checks + r2.checks + r3.checks;
    failures += r0.fails + r1.fails + r2.fails + r3.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
