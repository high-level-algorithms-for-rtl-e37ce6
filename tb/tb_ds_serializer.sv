// tb_ds_serializer: self-checking testbench for the input serializer.
// A signed (D = 3) and an unsigned (D = 2) instance load random 16-bit words;
// the L digits that follow each load are reassembled and compared with the
// word sign- or zero-extended to D*L bits.
module tb_ds_serializer;
  localparam int N = 16;
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

  localparam int D1 = 3, L1 = 8, W1 = D1 * L1;   // signed
  localparam int D2 = 2, L2 = 11, W2 = D2 * L2;  // unsigned
  logic         load;
  logic [N-1:0] x;
  logic [D1-1:0] d1;
  logic [D2-1:0] d2;
  logic [W1-1:0] w1;
  logic [W2-1:0] w2;

  ds_serializer #(.D(D1), .N(N), .L(L1), .SIGNED_X(1'b1)) dut_s (.clk, .rst_n, .load, .x, .dout(d1));
  ds_serializer #(.D(D2), .N(N), .L(L2), .SIGNED_X(1'b0)) dut_u (.clk, .rst_n, .load, .x, .dout(d2));

  initial begin
    load = 0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      x = 16'($urandom);
      if (n == 0) x = 16'h8000;
      if (n == 1) x = 16'h7fff;
      load = 1;
      @(negedge clk);
      load = 0;
      for (int j = 0; j < L2; j++) begin
        if (j < L1) w1[j*D1 +: D1] = d1;
        w2[j*D2 +: D2] = d2;
        @(negedge clk);
      end
      checks += 2;
      if (w1 !== W1'($signed(x))) begin
        failures++;
        $display("signed: x=%h got %h", x, w1);
      end
      if (w2 !== W2'(x)) begin
        failures++;
        $display("unsigned: x=%h got %h", x, w2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
