// fme_harness: drives one coprocessor instance with input width P through a
// series of random refinements (8x8 and 16x16 blocks, noisy matches, random
// lambda and mvd) and checks each result against the behavioural model: the
// returned cost must be the minimum Lagrangian cost over the 49 candidates,
// and done must come (h+6)*ceil((w+6)/P) + 8 cycles after start (start cycle
// counted). Reports totals through its outputs when finished. Instances with
// different P share the model arrays, so they must run one after another:
// each waits for 'go'.
module fme_harness
  import fme_pkg::*;
  import fme_ref_pkg::*;
#(
  parameter int unsigned P    = 1,
  parameter int          NBLK = 6
)(
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles_8x8,
  output int   cycles_16x16
);
  logic wr_en = 1'b0, wr_sel = 1'b0;
  logic [4:0] wr_row = '0, wr_col = '0;
  pix_t wr_data = '0;
  logic start = 1'b0;
  logic [4:0] blk_w = '0, blk_h = '0;
  mvd_t mvd_x = '0, mvd_y = '0;
  lambda_t lambda = '0;
  logic busy, done;
  fme_result_t result;
  longint cycle = 0;

  fme_coprocessor #(.P(P)) dut (.*);

  always @(posedge clk) cycle <= cycle + 1;

  task automatic run_one(int n, int noise, int lam, int mvx, int mvy);
    int best, c;
    longint t0, lat, exp_lat;
    rand_window(1'b1);
    cur_from_ref(n, n, $urandom_range(0, 6) - 3, $urandom_range(0, 6) - 3, noise);
    for (int y = 0; y < n + 6; y++)
      for (int x = 0; x < n + 6; x++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_sel = 1'b1; wr_row = 5'(y); wr_col = 5'(x); wr_data = pix_t'(W(y - 3, x - 3));
      end
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_sel = 1'b0; wr_row = 5'(y); wr_col = 5'(x); wr_data = pix_t'(cur[y][x]);
      end
    @(negedge clk);
    wr_en = 1'b0;
    best = 32'h7fffffff;
    for (int iy = -3; iy <= 3; iy++)
      for (int ix = -3; ix <= 3; ix++) begin
        c = sad(n, n, iy, ix) + rate(lam, mvx, mvy, iy, ix);
        if (c < best) best = c;
      end
    blk_w = 5'(n); blk_h = 5'(n); mvd_x = mvd_t'(mvx); mvd_y = mvd_t'(mvy); lambda = lambda_t'(lam);
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    lat = cycle - t0;
    exp_lat = longint'((n + 6) * ((n + 6 + int'(P) - 1) / int'(P)) + 8);
    if (n == 8) cycles_8x8 = int'(lat); else cycles_16x16 = int'(lat);
    checks += 2;
    if (lat != exp_lat) begin
      failures++; $display("FAIL: P=%0d %0dx%0d latency %0d expected %0d", P, n, n, lat, exp_lat);
    end
    if (int'(result.cost) != best) begin
      failures++; $display("FAIL: P=%0d %0dx%0d cost %0d expected %0d", P, n, n, result.cost, best);
    end
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0; cycles_8x8 = 0; cycles_16x16 = 0;
    wait (go && rst_n);
    for (int k = 0; k < NBLK; k++)
      run_one((k % 2 == 0) ? 8 : 16, $urandom_range(0, 8), $urandom_range(0, 50),
              $urandom_range(0, 20) - 10, $urandom_range(0, 20) - 10);
    finished = 1'b1;
  end
endmodule
