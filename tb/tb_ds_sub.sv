// tb_ds_sub: self-checking testbench for the digit-serial subtracter.
//
// Random words of W = D*L bits are split into digits and fed least
// significant digit first, `init` high on the last digit. The output digits
// are reassembled and compared with (a - b) mod 2^W. Several digit sizes are
// covered by one instance per size.
module tb_ds_sub;
  localparam int L = 8;
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

  logic done1, done3, done4;

  tb_add_run #(.D(1), .L(L), .SUB(1)) r1 (.clk, .rst_n, .checks_o(), .fails_o(), .done(done1));
  tb_add_run #(.D(3), .L(L), .SUB(1)) r3 (.clk, .rst_n, .checks_o(), .fails_o(), .done(done3));
  tb_add_run #(.D(4), .L(L), .SUB(1)) r4 (.clk, .rst_n, .checks_o(), .fails_o(), .done(done4));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done1 && done3 && done4);
    checks   = r1.checks + r3.checks + r4.checks;
    failures += r1.fails + r3.fails + r4.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
