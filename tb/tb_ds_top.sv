// tb_ds_top: end-to-end testbench of ds_top with every parameter at its
// default. It runs the bit-serial MCM unit (29x and 43x, 22 cycles per
// computation) and the bit-serial FIR filter (35 cycles per sample) at the
// same time and checks every result against arithmetic worked out here.
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: a subtraction in the network, a storage block held
// by its comparator while the computation goes on, a negative input, a
// negative (two's complement) coefficient product and an even (shifted)
// coefficient product, a carry out of a word delay into the next sample
// (output depending on an earlier sample) and full-scale inputs.
module tb_ds_top;
  localparam int P = 35, LM = 22;
  localparam longint H [5] = '{-14, 29, 43, 29, -14};
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

  logic               mcm_start, mcm_ready, mcm_busy, mcm_done;
  logic [15:0]        mcm_x, fir_x;
  logic [1:0][0:0]    mcm_dig;
  logic [1:0][21:0]   mcm_prod;
  logic               fir_x_take, fir_y_valid;
  logic [0:0]         fir_y_dig;
  logic signed [34:0] fir_y;

  ds_top dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // mechanism counters
  int n_sub = 0, n_hold = 0, n_negx = 0, n_negcoef = 0, n_evencoef = 0;
  int n_memory = 0, n_fullscale = 0, n_mcm = 0, n_fir = 0;

  always @(negedge clk) if (rst_n) begin
    if (dut.u_mcm.busy && dut.u_mcm.u_net.node[1] != dut.u_mcm.u_net.node[0]) n_sub++;
    if (dut.u_mcm.busy && !dut.u_mcm.en[0] && dut.u_mcm.en[1]) n_hold++;
    if (dut.u_fir.prod[0] != '0) n_negcoef++;
    if (dut.u_fir.g_tap[0].u_coef.shd != '0) n_evencoef++;
  end

  // MCM stream
  initial begin
    longint xv;
    int cyc;
    mcm_start = 0; mcm_x = '0;
    @(posedge rst_n);
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      mcm_x = 16'($urandom);
      if (n == 0) mcm_x = 16'h8000;
      if (n == 1) mcm_x = 16'h7fff;
      xv = longint'($signed(mcm_x));
      if (xv < 0) n_negx++;
      if (xv == -32768 || xv == 32767) n_fullscale++;
      mcm_start = 1;
      @(negedge clk);
      mcm_start = 0;
      cyc = 1;
      while (!mcm_done && cyc < 100) begin
        @(negedge clk);
        cyc++;
      end
      check("MCM latency", cyc, LM + 1);
      check("29x", longint'($signed(mcm_prod[0])), 29 * xv);
      check("43x", longint'($signed(mcm_prod[1])), 43 * xv);
      n_mcm++;
    end
  end

  // FIR stream
  longint xs [$];
  int     take_cyc [$];

  function automatic longint y_of(int n);
    longint acc = 0;
    for (int k = 0; k < 5; k++)
      if (n - k >= 0) acc += H[k] * xs[n - k];
    return acc;
  endfunction

  initial begin
    int cyc, idx;
    longint xv;
    fir_x = '0;
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_fir < 30 || n_mcm < 40) begin
      @(negedge clk);
      cyc++;
      if (fir_x_take) begin
        xv = longint'($signed(16'($urandom)));
        if (xs.size() % 7 == 2) xv = -32768;
        if (xs.size() % 7 == 5) xv = 32767;
        fir_x = 16'(xv);
        xs.push_back(xv);
        take_cyc.push_back(cyc);
      end
      if (fir_y_valid) begin
        idx = -1;
        foreach (take_cyc[i]) if (take_cyc[i] == cyc - (P + 2)) idx = i;
        if (idx >= 0) begin
          check("FIR output", longint'(fir_y), y_of(idx));
          if (idx > 0 && y_of(idx) != H[0] * xs[idx]) n_memory++;
          n_fir++;
        end
      end
    end
    checks++;
    if (n_sub == 0 || n_hold == 0 || n_negx == 0 || n_negcoef == 0 || n_evencoef == 0 ||
        n_memory == 0 || n_fullscale == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("exercised: subtraction %0d, storage hold %0d, negative input %0d,",
             n_sub, n_hold, n_negx);
    $display("           negative coefficient %0d, even coefficient %0d,",
             n_negcoef, n_evencoef);
    $display("           sample memory %0d, full-scale input %0d, MCM runs %0d, FIR outputs %0d",
             n_memory, n_fullscale, n_mcm, n_fir);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
