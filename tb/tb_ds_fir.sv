// tb_ds_fir: self-checking testbench for the digit-serial transposed-form
// FIR filter at the digit sizes 1, 2, 4 and 8, whose sample periods for a
// 35-bit output are 35, 18, 9 and 5 cycles, and with a 35-bit digit, which
// turns the filter into a one-cycle (bit-parallel) design.
module tb_ds_fir;
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

  logic [4:0] dn;
  tb_fir_run #(.D(1)) r0 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[0]));
  tb_fir_run #(.D(2)) r1 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[1]));
  tb_fir_run #(.D(4)) r2 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[2]));
  tb_fir_run #(.D(8)) r3 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[3]));
  tb_fir_run #(.D(35)) r4 (.clk, .rst_n, .checks_o(), .fails_o(), .done_o(dn[4]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&dn);
    checks   = r0.checks + r1.checks + r2.checks + r3.checks + r4.checks;
    failures += r0.fails + r1.fails + r2.fails + r3.fails + r4.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
