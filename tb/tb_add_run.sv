// tb_add_run: drives one ds_add (or, with SUB = 1, one ds_sub) instance with
// random words and checks the reassembled result against the arithmetic
// reference. Used by tb_ds_add and tb_ds_sub.
module tb_add_run #(
  parameter int D   = 1,
  parameter int L   = 8,
  parameter bit SUB = 1'b0
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
  logic [D-1:0] a, b, s;
  logic [W-1:0] wa, wb, ws, ref_v;

  if (SUB) begin : g_sub
    ds_sub #(.D(D)) dut (.clk, .rst_n, .init, .a, .b, .s);
  end else begin : g_add
    ds_add #(.D(D)) dut (.clk, .rst_n, .init, .a, .b, .s);
  end

  assign checks_o = checks;
  assign fails_o  = fails;

  initial begin
    done = 0; init = 1; a = '0; b = '0;
    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      wa = W'({$urandom, $urandom});
      wb = W'({$urandom, $urandom});
      if (n == 0) begin wa = '1; wb = W'(1); end   // full carry ripple
      if (n == 1) begin wa = '0; wb = W'(1); end   // borrow ripple for sub
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        a    = wa[j*D +: D];
        b    = wb[j*D +: D];
        init = (j == L - 1);
        #1 ws[j*D +: D] = s;
      end
      ref_v = SUB ? wa - wb : wa + wb;
      checks++;
      if (ws !== ref_v) begin
        fails++;
        $display("D=%0d SUB=%0d: a=%h b=%h got %h expected %h", D, SUB, wa, wb, ws, ref_v);
      end
    end
    @(negedge clk);
    done = 1;
  end
endmodule
