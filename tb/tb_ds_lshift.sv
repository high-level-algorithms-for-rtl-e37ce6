// tb_ds_lshift: self-checking testbench for the digit-serial left shifter.
// Covers the two shifts drawn for digit size 3 (by 2 and by 4 bits), the
// bit-serial case, a shift of a whole digit and a shift of zero.
module tb_ds_lshift;
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

  logic [5:0] dn;
  tb_lshift_run #(.D(3), .LS(2)) r0 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[0]));
  tb_lshift_run #(.D(3), .LS(4)) r1 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[1]));
  tb_lshift_run #(.D(1), .LS(3)) r2 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[2]));
  tb_lshift_run #(.D(4), .LS(4)) r3 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[3]));
  tb_lshift_run #(.D(2), .LS(0)) r4 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[4]));
  tb_lshift_run #(.D(4), .LS(7)) r5 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[5]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&dn);
    checks   = r0.checks + r1.checks + r2.checks + r3.checks + r4.checks + r5.checks;
    failures += r0.fails + r1.fails + r2.fails + r3.fails + r4.fails + r5.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
