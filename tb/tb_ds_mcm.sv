// tb_ds_mcm: self-checking testbench for the complete MCM unit: the default
// bit-serial, signed configuration (22 cycles), a digit-serial signed one
// with D = 4 (6 cycles), an unsigned one with D = 3 (8 cycles) and one
// whose digit is the whole 22-bit word (1 cycle).
module tb_ds_mcm;
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
  tb_mcm_run #(.D(1), .SIGNED_X(1'b1)) r0 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[0]));
  tb_mcm_run #(.D(4), .SIGNED_X(1'b1)) r1 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[1]));
  tb_mcm_run #(.D(3), .SIGNED_X(1'b0)) r2 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[2]));
  // digit as wide as the word: one cycle per computation
  tb_mcm_run #(.D(22), .SIGNED_X(1'b1)) r3 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[3]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&dn);
    checks   = r0.checks + r1.checks + r2.checks + r3.checks;
    failures += r0.fails + r1.fails + r2.fails + r3.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
