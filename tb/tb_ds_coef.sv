// tb_ds_coef: self-checking testbench for the even/negative coefficient
// stage: shifted and negated, shifted only, negated only.
module tb_ds_coef;
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

  logic [2:0] dn;
  tb_coef_run #(.D(1), .SH(1), .NEG(1'b1)) r0 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[0]));
  tb_coef_run #(.D(3), .SH(2), .NEG(1'b0)) r1 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[1]));
  tb_coef_run #(.D(2), .SH(0), .NEG(1'b1)) r2 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&dn);
    checks   = r0.checks + r1.checks + r2.checks;
    failures += r0.fails + r1.fails + r2.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
