// mcm_ctrl: control of one digit-serial MCM computation.
//
// A counter of ceil(log2 L) bits counts the digit cycles of the computation
// and one constant comparator per target product decides whether the digit
// produced in this cycle is shifted into that product's storage block: it is
// shifted while the count is below KV[t] = ceil(bw_cx / d), the number of
// digits of that product, and held afterwards, so every storage block ends up
// with exactly its own digits although the products have different widths.
//
// Interface and timing: `start` is accepted while idle (`ready` high). The
// cycle after, `busy` rises with count 0; digit j of the computation is in
// the cycle with count j. `init` is high in the last digit cycle (count L-1)
// and whenever idle, so that all carry and shift flip-flops of the datapath
// hold their initial values when a computation begins. `done` pulses in the
// cycle after the last digit, L+1 cycles after `start`. Reset is active low
// and asynchronous. The handshake is this design's choice.
module mcm_ctrl #(
  parameter int unsigned L  = 22,                   // latency in digit cycles
  parameter int unsigned NT = 2,                    // number of stored products
  parameter logic [NT-1:0][15:0] KV = {16'd22, 16'd21} // digits per product (KV[t])
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          ready,
  output logic          busy,
  output logic          init,
  output logic [NT-1:0] en,
  output logic          done
);

  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1;

  logic [CW-1:0] cnt;
  logic          last;

  assign last  = busy && (cnt == CW'(L - 1));
  assign ready = !busy;
  assign init  = !busy || last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (!busy) begin
        cnt <= '0;
        if (start) busy <= 1'b1;
      end else if (last) begin
        busy <= 1'b0;
        cnt  <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  for (genvar t = 0; t < int'(NT); t++) begin : g_cmp
    assign en[t] = busy && (32'(cnt) < 32'(KV[t]));
  end

  // a storage block is only written during a computation, and a computation
  // ends before done is signalled
  a_en_only_busy: assert property (@(posedge clk) disable iff (!rst_n) (|en) |-> busy);
  a_done_idle:    assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n) last |=> done);

endmodule
