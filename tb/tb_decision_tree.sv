// tb_decision_tree: loads random cost matrices (many with deliberate ties and
// with the minimum placed in a chosen quadrant), raises half_ready and, a few
// cycles later, all_ready, and checks that done pulses exactly 3 cycles after
// all_ready, that the reported cost is the minimum of the 49 costs, and that
// the reported offset holds that cost.
module tb_decision_tree;
  import fme_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, half_ready = 1'b0, all_ready = 1'b0, done;
  cost_t sad [NSIDE][NSIDE];
  qoff_t best_dy, best_dx;
  cost_t best_cost;
  int checks = 0, failures = 0;
  int quad_hits [4];

  decision_tree dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int iy = 0; iy < NSIDE; iy++) for (int ix = 0; ix < NSIDE; ix++) sad[iy][ix] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      cost_t mn;
      int gap, n, ty, tx;
      for (int iy = 0; iy < NSIDE; iy++)
        for (int ix = 0; ix < NSIDE; ix++)
          sad[iy][ix] = cost_t'((t % 3 == 0) ? $urandom_range(100, 110) : $urandom_range(1000, 1 << 30));
      ty = $urandom_range(0, 6); tx = $urandom_range(0, 6);
      if (t % 2 == 0) sad[ty][tx] = cost_t'($urandom_range(0, 99));
      mn = '1;
      for (int iy = 0; iy < NSIDE; iy++) for (int ix = 0; ix < NSIDE; ix++) if (sad[iy][ix] < mn) mn = sad[iy][ix];
      @(negedge clk);
      half_ready = 1'b1;
      @(negedge clk);
      half_ready = 1'b0;
      gap = $urandom_range(1, 8);
      repeat (gap) @(negedge clk);
      all_ready = 1'b1;
      @(negedge clk);
      all_ready = 1'b0;
      n = 1;
      while (!done && n < 10) begin @(negedge clk); n++; end
      checks++;
      if (n != 3) begin failures++; $display("FAIL: done %0d cycles after all_ready", n); end
      checks++;
      if (best_cost != mn) begin failures++; $display("FAIL: cost %0d expected %0d", best_cost, mn); end
      checks++;
      if (sad[int'(best_dy) + 3][int'(best_dx) + 3] != mn) begin
        failures++; $display("FAIL: offset (%0d,%0d) does not hold the minimum", best_dy, best_dx);
      end
      quad_hits[2 * int'(best_dy > 0) + int'(best_dx > 0)]++;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (quad_hits[k] == 0) begin failures++; $display("FAIL: quadrant %0d never selected", k); end
    end
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
