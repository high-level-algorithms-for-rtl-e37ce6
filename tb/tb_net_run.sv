// tb_net_run: drives one ds_mcm_network #(D) (default operations: 7, 29, 43)
// with random sign-extended 16-bit inputs, L digits per word, and checks
// every node against c * x mod 2^(D*L) for c = 1, 7, 29, 43. Used by
// tb_ds_mcm_network.
module tb_net_run #(
  parameter int D = 1,
  parameter int L = 24
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   fails_o,
  output logic done
);
  localparam int W = D * L;
  localparam int C [4] = '{1, 7, 29, 43};
  int checks = 0, fails = 0;
  logic            init;
  logic [D-1:0]    x;
  logic [3:0][D-1:0] node;
  logic [W-1:0]    wx;
  logic [W-1:0]    wn [4];

  ds_mcm_network #(.D(D)) dut (.clk, .rst_n, .init, .x, .node);

  assign checks_o = checks;
  assign fails_o  = fails;

  initial begin
    done = 0; init = 1; x = '0;
    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      wx = W'($signed(16'($urandom)));
      if (n == 0) wx = W'($signed(16'h8000));
      if (n == 1) wx = W'($signed(16'h7fff));
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        x    = wx[j*D +: D];
        init = (j == L - 1);
        #1;
        for (int k = 0; k < 4; k++) wn[k][j*D +: D] = node[k];
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (wn[k] !== W'(wx * W'(C[k]))) begin
          fails++;
          $display("D=%0d node %0d: x=%h got %h expected %h", D, k, wx, wn[k], W'(wx * W'(C[k])));
        end
      end
    end
    @(negedge clk);
    done = 1;
  end
endmodule
