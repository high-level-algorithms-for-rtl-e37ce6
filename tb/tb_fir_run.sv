// tb_fir_run: drives one ds_fir #(D) (default 5-tap example coefficients
// {-14, 29, 43, 29, -14}, N = 16, WOUT = 35) with random signed samples,
// including full-scale ones, and compares every output with
// y(n) = sum_k h_k x(n-k) worked out here. It also checks the sample period
// ceil(35 / D) cycles and that an output appears P + 2 cycles after the
// cycle that took its newest sample. Used by tb_ds_fir.
module tb_fir_run #(
  parameter int D       = 1,
  parameter int NSAMPLE = 40
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   fails_o,
  output logic done_o
);
  localparam int N = 16, WOUT = 35;
  localparam int P = (WOUT + D - 1) / D;
  localparam longint H [5] = '{-14, 29, 43, 29, -14};
  int checks = 0, fails = 0;

  logic                   x_take, y_valid;
  logic [N-1:0]           x_in;
  logic [D-1:0]           y_dig;
  logic signed [WOUT-1:0] y_out;

  ds_fir #(.D(D)) dut (.clk, .rst_n, .x_in, .x_take, .y_dig, .y_out, .y_valid);

  assign checks_o = checks;
  assign fails_o  = fails;

  longint xs [$];      // samples taken, newest last
  int     take_cyc [$];
  longint yexp [$];

  function automatic longint y_of(int n);
    longint acc = 0;
    for (int k = 0; k < 5; k++)
      if (n - k >= 0) acc += H[k] * xs[n - k];
    return acc;
  endfunction

  initial begin
    int cyc, last_take, outs, idx;
    longint xv;
    done_o = 0; x_in = '0;
    cyc = 0; last_take = -1; outs = 0;
    @(posedge rst_n);
    while (xs.size() < NSAMPLE + 8) begin
      @(negedge clk);
      cyc++;
      if (x_take) begin
        if (last_take >= 0) begin
          checks++;
          if (cyc - last_take != P) begin
            fails++;
            $display("D=%0d sample period %0d, expected %0d", D, cyc - last_take, P);
          end
        end
        last_take = cyc;
        xv = longint'($signed(16'($urandom)));
        case (xs.size() % 11)
          3: xv = -32768;
          4: xv = -32768;
          7: xv = 32767;
          default: ;
        endcase
        if (xs.size() >= NSAMPLE) xv = 0;   // flush
        x_in = 16'(xv);
        xs.push_back(xv);
        take_cyc.push_back(cyc);
        yexp.push_back(y_of(xs.size() - 1));
      end
      if (y_valid) begin
        // newest sample in this output: the one taken P + 2 cycles ago
        idx = -1;
        foreach (take_cyc[i]) if (take_cyc[i] == cyc - (P + 2)) idx = i;
        checks++;
        if (idx < 0) begin
          if (take_cyc.size() > 0 && cyc - (P + 2) > take_cyc[0]) begin
            fails++;
            $display("D=%0d output at cycle %0d matches no sample", D, cyc);
          end else if (y_out != 0) begin
            fails++;
            $display("D=%0d output before first sample is %0d", D, y_out);
          end
        end else if (longint'(y_out) != yexp[idx]) begin
          fails++;
          $display("D=%0d y(%0d) = %0d expected %0d", D, idx, y_out, yexp[idx]);
        end else begin
          outs++;
        end
      end
    end
    checks++;
    if (outs < NSAMPLE) begin
      fails++;
      $display("D=%0d only %0d outputs matched", D, outs);
    end
    done_o = 1;
  end
endmodule
