// tb_fir200_run: one ds_fir #(D) instance with the 200-tap filter of
// fir200_pkg, driven with random and full-scale signed samples; checks
// outputs, sample period ceil(35 / D) and output latency P + 2 cycles after
// the cycle that took the newest sample. Used by tb_fir_200.
module tb_fir200_run
  import fir200_pkg::*;
#(
  parameter int D       = 1,
  parameter int NSAMPLE = 260
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   fails_o,
  output logic done_o
);
  localparam int N = 16, WOUT = 35;
  localparam int P = (WOUT + D - 1) / D;
  int checks = 0, fails = 0;

  logic                   x_take, y_valid;
  logic [N-1:0]           x_in;
  logic [D-1:0]           y_dig;
  logic signed [WOUT-1:0] y_out;

  ds_fir #(.D(D), .N(N), .WOUT(WOUT), .NOPS(NOPS), .OPS(make_ops()),
           .NTAP(NTAP), .TAPS(make_taps())) dut (
    .clk, .rst_n, .x_in, .x_take, .y_dig, .y_out, .y_valid
  );

  assign checks_o = checks;
  assign fails_o  = fails;

  longint hv [NTAP];
  longint xs [$];
  int     take_cyc [$];

  function automatic longint y_of(int n);
    longint acc = 0;
    for (int k = 0; k < NTAP; k++)
      if (n - k >= 0) acc += hv[k] * xs[n - k];
    return acc;
  endfunction

  initial begin
    int cyc, last_take, outs, idx;
    longint xv;
    for (int k = 0; k < NTAP; k++) hv[k] = longint'(coef(k));
    done_o = 0; x_in = '0;
    cyc = 0; last_take = -1; outs = 0;
    @(posedge rst_n);
    while (xs.size() < NSAMPLE + 2) begin
      @(negedge clk);
      cyc++;
      if (x_take) begin
        if (last_take >= 0) begin
          checks++;
          if (cyc - last_take != P) fails++;
        end
        last_take = cyc;
        xv = longint'($signed(16'($urandom)));
        // a run of full-scale samples of matching sign drives the output
        // towards its largest magnitude
        if (xs.size() >= 20 && xs.size() < 230) begin
          xv = (hv[(xs.size() - 20) % NTAP] < 0) ? -32768 : 32767;
          if (xs.size() >= 220) xv = longint'($signed(16'($urandom)));
        end
        x_in = 16'(xv);
        xs.push_back(xv);
        take_cyc.push_back(cyc);
      end
      if (y_valid) begin
        idx = -1;
        foreach (take_cyc[i]) if (take_cyc[i] == cyc - (P + 2)) idx = i;
        if (idx >= 0) begin
          checks++;
          if (longint'(y_out) != y_of(idx)) begin
            fails++;
            if (fails < 5) $display("D=%0d y(%0d) = %0d expected %0d", D, idx, y_out, y_of(idx));
          end else begin
            outs++;
          end
        end
      end
    end
    checks++;
    if (outs < NSAMPLE - 5) begin
      fails++;
      $display("D=%0d only %0d outputs matched", D, outs);
    end
    done_o = 1;
  end
endmodule
