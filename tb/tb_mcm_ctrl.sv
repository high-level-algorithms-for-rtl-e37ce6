// tb_mcm_ctrl: self-checking testbench for the MCM controller at its default
// size (L = 22 digit cycles, products of 21 and 22 digits). For every
// computation it checks that busy lasts L cycles, that each storage enable
// is high for exactly its digit count and only at the start of the
// computation, that init is high in the last digit cycle and while idle and
// nowhere else, that done pulses L+1 cycles after start, and that a start
// during a computation is ignored.
module tb_mcm_ctrl;
  localparam int L = 22, NT = 2;
  localparam logic [NT-1:0][15:0] KV = {16'd22, 16'd21};
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

  logic start, ready, busy, init, done;
  logic [NT-1:0] en;

  mcm_ctrl #(.L(L), .NT(NT), .KV(KV)) dut (.clk, .rst_n, .start, .ready, .busy, .init, .en, .done);

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int cyc, busy_cnt, done_at;
    int en_cnt [NT];
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      @(negedge clk);
      expect_eq("ready when idle", ready, 1);
      expect_eq("init when idle", init, 1);
      start = 1;
      @(negedge clk);
      start = 0;
      busy_cnt = 0; done_at = -1;
      for (int t = 0; t < NT; t++) en_cnt[t] = 0;
      for (cyc = 1; cyc <= L + 3; cyc++) begin
        if (cyc == 5) start = 1;   // must be ignored while busy
        if (cyc == 6) start = 0;
        if (busy) busy_cnt++;
        for (int t = 0; t < NT; t++) begin
          if (en[t]) begin
            en_cnt[t]++;
            if (cyc > int'(KV[t])) begin
              failures++;
              $display("enable %0d late at cycle %0d", t, cyc);
            end
          end
        end
        if (busy && (init != (cyc == L))) begin
          failures++;
          $display("init wrong at cycle %0d", cyc);
        end
        if (done && done_at < 0) done_at = cyc;
        @(negedge clk);
      end
      expect_eq("busy cycles", busy_cnt, L);
      expect_eq("done cycle after start", done_at, L + 1);
      for (int t = 0; t < NT; t++) expect_eq("enable cycles", en_cnt[t], int'(KV[t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
