// tb_lshift_run: drives one ds_lshift #(D, LS) with random words of L digits
// and checks that the reassembled output word is (input << LS) mod 2^(D*L),
// i.e. that the low end is filled with zeros at every word start. It also
// counts the shifter's flip-flops through its layer parameters and checks
// that they add up to LS. Used by tb_ds_lshift.
module tb_lshift_run #(
  parameter int D  = 1,
  parameter int LS = 1,
  parameter int L  = 8
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
  logic [D-1:0] a, c;
  logic [W-1:0] wa, wc, ref_v;

  ds_lshift #(.D(D), .LS(LS)) dut (.clk, .rst_n, .init, .a, .c);

  assign checks_o = checks;
  assign fails_o  = fails;

  // flip-flop count of layer i, worked out directly: bit i reaches bit
  // position i + LS, which lies floor((i + LS) / D) digits later
  function automatic int ff_total();
    int t = 0;
    for (int i = 0; i < D; i++) t += (i + LS) / D;
    return t;
  endfunction

  initial begin
    done = 0; init = 1; a = '0;
    checks++;
    if (ff_total() != LS) begin
      fails++;
      $display("D=%0d LS=%0d: flip-flop count %0d", D, LS, ff_total());
    end
    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      wa = W'({$urandom, $urandom});
      if (n == 0) wa = '1;
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        a    = wa[j*D +: D];
        init = (j == L - 1);
        #1 wc[j*D +: D] = c;
      end
      ref_v = wa << LS;
      checks++;
      if (wc !== ref_v) begin
        fails++;
        $display("D=%0d LS=%0d: in %h got %h expected %h", D, LS, wa, wc, ref_v);
      end
    end
    @(negedge clk);
    done = 1;
  end
endmodule
