// tb_ds_storage: self-checking testbench for the digit-serial to parallel
// storage. K = 4 digits of D = 3 bits are shifted in with idle (en low)
// cycles in between; the parallel word must hold digit j in bits [3j +: 3]
// and must not change while en is low.
module tb_ds_storage;
  localparam int D = 3, K = 4;
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

  logic           en;
  logic [D-1:0]   din;
  logic [K*D-1:0] q, w, held;

  ds_storage #(.D(D), .K(K)) dut (.clk, .rst_n, .en, .din, .q);

  initial begin
    en = 0; din = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("not cleared by reset"); end
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      w = (K*D)'($urandom);
      for (int j = 0; j < K; j++) begin
        @(negedge clk);
        en  = 1;
        din = w[j*D +: D];
        if ($urandom % 3 == 0) begin
          @(negedge clk);
          en = 0;
          din = D'($urandom);
          held = q;
          @(negedge clk);
          checks++;
          if (q !== held) begin failures++; $display("changed while disabled"); end
        end
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (q !== w) begin
        failures++;
        $display("stored %h expected %h", q, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
