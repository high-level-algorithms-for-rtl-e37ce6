// tb_coef_run: drives one ds_coef #(D, SH, NEG) with random words and checks
// the result against (+/-)(a << SH) mod 2^(D*L). Used by tb_ds_coef.
module tb_coef_run #(
  parameter int D   = 1,
  parameter int SH  = 1,
  parameter bit NEG = 1'b1,
  parameter int L   = 10
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   fails_o,
  output logic done
);
  localparam int W = D * L;
  int checks = 0, fails = 0;
  logic         init;
  logic [D-1:0] a, y;
  logic [W-1:0] wa, wy, ref_v;

  ds_coef #(.D(D), .SH(SH), .NEG(NEG)) dut (.clk, .rst_n, .init, .a, .y);

  assign checks_o = checks;
  assign fails_o  = fails;

  initial begin
    done = 0; init = 1; a = '0;
    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      wa = W'({$urandom, $urandom});
      if (n == 0) wa = '0;
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        a    = wa[j*D +: D];
        init = (j == L - 1);
        #1 wy[j*D +: D] = y;
      end
      ref_v = NEG ? W'(0) - (wa << SH) : (wa << SH);
      checks++;
      if (wy !== ref_v) begin
        fails++;
        $display("D=%0d SH=%0d NEG=%0d: in %h got %h expected %h", D, SH, NEG, wa, wy, ref_v);
      end
    end
    @(negedge clk);
    done = 1;
  end
endmodule
