// tb_ds_mcm_network: self-checking testbench for the shift-adds network with
// the default operations for 29x and 43x, bit-serial and with digit sizes 2
// and 3 (22, 11 and 8 digits per word, i.e. ceil((6 + 16) / D)).
module tb_ds_mcm_network;
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
  tb_net_run #(.D(1), .L(22)) r0 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[0]));
  tb_net_run #(.D(2), .L(11)) r1 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[1]));
  tb_net_run #(.D(3), .L(8))  r2 (.clk, .rst_n, .checks_o(), .fails_o(), .done(dn[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the bit-serial 29x/43x network: 2 additions, 1 subtraction, 5 shift
    // flip-flops; at D = 3, 9 full adders and 3 inverters
    checks += 5;
    if (r0.dut.NUM_ADD != 2)      begin failures++; $display("additions %0d", r0.dut.NUM_ADD); end
    if (r0.dut.NUM_SUB != 1)      begin failures++; $display("subtractions %0d", r0.dut.NUM_SUB); end
    if (r0.dut.NUM_SHIFT_FF != 5) begin failures++; $display("shift flip-flops %0d", r0.dut.NUM_SHIFT_FF); end
    if (r2.dut.NUM_FA != 9)       begin failures++; $display("full adders %0d", r2.dut.NUM_FA); end
    if (r2.dut.NUM_INV != 3)      begin failures++; $display("inverters %0d", r2.dut.NUM_INV); end
    wait (&dn);
    checks   += r0.checks + r1.checks + r2.checks;
    failures += r0.fails + r1.fails + r2.fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
