// tb_ds_word_delay: self-checking testbench for the one-sample digit delay.
// Random digits go in every cycle; each must come out exactly P cycles
// later, and the first P outputs after reset must be zero.
module tb_ds_word_delay;
  localparam int D = 2, P = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [D-1:0] din, dout;
  logic [D-1:0] hist [$];

  ds_word_delay #(.D(D), .P(P)) dut (.clk, .rst_n, .din, .dout);

  initial begin
    din = '0;
    for (int i = 0; i < P; i++) hist.push_back('0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      din = D'($urandom);
      hist.push_back(din);
      #1;
      checks++;
      if (dout !== hist.pop_front()) begin
        failures++;
        $display("cycle %0d: wrong output %0d", n, dout);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
