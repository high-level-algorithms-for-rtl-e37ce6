// tb_mcm_run: drives one ds_mcm #(D, SIGNED_X) (default constants 29 and 43,
// N = 16) through a series of computations with random and extreme inputs.
// Checks both parallel products against 29*x and 43*x, that done arrives
// ceil((6 + 16) / D) + 1 cycles after start, and that the products stay put
// until the next start. Used by tb_ds_mcm.
module tb_mcm_run #(
  parameter int D        = 1,
  parameter bit SIGNED_X = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   fails_o,
  output logic done_o
);
  localparam int N  = 16;
  localparam int PW = 6 + N;
  localparam int L  = (6 + N + D - 1) / D;
  int checks = 0, fails = 0;

  logic                 start, ready, busy, done;
  logic [N-1:0]         x;
  logic [1:0][D-1:0]    dig;
  logic [1:0][PW-1:0]   prod;

  ds_mcm #(.D(D), .SIGNED_X(SIGNED_X)) dut (
    .clk, .rst_n, .start, .x, .ready, .busy, .done, .dig, .prod
  );

  assign checks_o = checks;
  assign fails_o  = fails;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      fails++;
      $display("D=%0d S=%0d %s: got %0d expected %0d", D, SIGNED_X, what, got, exp);
    end
  endtask

  initial begin
    longint xv;
    int cyc;
    done_o = 0; start = 0; x = '0;
    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < 25; n++) begin
      @(negedge clk);
      x = 16'($urandom);
      if (n == 0) x = 16'h8000;
      if (n == 1) x = 16'h7fff;
      if (n == 2) x = 16'hffff;
      xv = SIGNED_X ? longint'($signed(x)) : longint'(x);
      check("ready", ready, 1);
      start = 1;
      @(negedge clk);
      start = 0;
      x = 16'($urandom);   // input may change once accepted
      cyc = 1;
      while (!done && cyc < 200) begin
        @(negedge clk);
        cyc++;
      end
      check("latency", cyc, L + 1);
      if (SIGNED_X) begin
        check("29x", longint'($signed(prod[0])), 29 * xv);
        check("43x", longint'($signed(prod[1])), 43 * xv);
      end else begin
        check("29x", longint'(prod[0]), 29 * xv);
        check("43x", longint'(prod[1]), 43 * xv);
      end
      repeat (3) @(negedge clk);
      if (SIGNED_X) check("29x held", longint'($signed(prod[0])), 29 * xv);
      else          check("29x held", longint'(prod[0]), 29 * xv);
    end
    @(negedge clk);
    done_o = 1;
  end
endmodule
