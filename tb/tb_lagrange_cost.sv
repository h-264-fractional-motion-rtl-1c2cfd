// tb_lagrange_cost: random and edge-case vector differences and lambdas; after
// each start the bench checks that done arrives after exactly 14 busy cycles
// and that all 49 costs equal lambda * (bits(mvd_x+dx) + bits(mvd_y+dy)) with
// the Exp-Golomb lengths of the behavioural model.
module tb_lagrange_cost;
  import fme_pkg::*;
  import fme_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  mvd_t mvd_x = '0, mvd_y = '0;
  lambda_t lambda = '0;
  cost_t cand_cost [NSIDE][NSIDE];
  int checks = 0, failures = 0;

  lagrange_cost dut (.*);
  always #5 clk = ~clk;

  task automatic run(int mx, int my, int lam);
    int n;
    @(negedge clk);
    mvd_x = mvd_t'(mx); mvd_y = mvd_t'(my); lambda = lambda_t'(lam); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    mvd_x = '0; mvd_y = '0; lambda = '0;     // must have been sampled
    n = 0;
    while (!done) begin @(negedge clk); n++; end
    checks++;
    if (n != 14) begin failures++; $display("FAIL: done after %0d cycles", n); end
    for (int iy = 0; iy < NSIDE; iy++)
      for (int ix = 0; ix < NSIDE; ix++) begin
        longint exp;
        exp = longint'(lam) * longint'(eg_bits(mx + ix - 3) + eg_bits(my + iy - 3));
        checks++;
        if (longint'(cand_cost[iy][ix]) != exp) begin
          failures++;
          $display("FAIL: mvd (%0d,%0d) lambda %0d cand (%0d,%0d): %0d expected %0d",
                   mx, my, lam, iy - 3, ix - 3, cand_cost[iy][ix], exp);
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(0, 0, 1);
    run(3, -3, 7);
    run(-32000, 32000, 65535);
    run(32764, -32764, 300);
    for (int k = 0; k < 30; k++)
      run(int'($urandom_range(0, 400)) - 200, int'($urandom_range(0, 400)) - 200,
          int'($urandom_range(0, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
