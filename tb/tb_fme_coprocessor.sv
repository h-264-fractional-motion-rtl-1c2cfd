// tb_fme_coprocessor: end-to-end test of the refinement coprocessor at its
// default parameters (P = 2, blocks up to 16x16).
//
// For each test block the bench builds a random reference window, derives the
// current block from the reference at a chosen quarter-pel offset (with or
// without noise), loads both through the host port, starts a refinement and
// checks: the returned cost equals the minimum over all 49 candidates of
// SAD + lambda * rate from the behavioural model; the returned offset really
// has that cost; the refined mvd is mvd + offset; and done arrives exactly
// (h+6)*(w+6)/P + 8 cycles after start (start cycle counted). It also counts the mechanisms the
// design relies on and fails if one never occurred: every block size
// (4x4, 8x8, 16x16, 8x16, 16x8), a winner in each of the four PE quadrants,
// a decision changed by the rate term, and a start ignored while busy.
module tb_fme_coprocessor;
  import fme_pkg::*;
  import fme_ref_pkg::*;

  localparam int P = 2;
  localparam int PIPE = 8;   // cycles after the last window beat, counting the start cycle

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, wr_sel = 1'b0;
  logic [4:0] wr_row = '0, wr_col = '0;
  pix_t wr_data = '0;
  logic start = 1'b0;
  logic [4:0] blk_w = '0, blk_h = '0;
  mvd_t mvd_x = '0, mvd_y = '0;
  lambda_t lambda = '0;
  logic busy, done;
  fme_result_t result;

  fme_coprocessor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_size [5];
  int n_quad [4];
  int n_rate_changed = 0, n_ignored_start = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load(int h, int w);
    for (int y = 0; y < h + 6; y++)
      for (int x = 0; x < w + 6; x++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_sel = 1'b1; wr_row = 5'(y); wr_col = 5'(x);
        wr_data = pix_t'(W(y - 3, x - 3));
      end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_sel = 1'b0; wr_row = 5'(y); wr_col = 5'(x);
        wr_data = pix_t'(cur[y][x]);
      end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic run_one(int h, int w, int dy, int dx, int noise, int lam, int mvx, int mvy);
    int best, c, cs, sidx, qd, sad_best, sad_arg_y, sad_arg_x;
    longint t0, lat;
    rand_window(noise > 0);
    cur_from_ref(h, w, dy, dx, noise);
    load(h, w);
    // reference decision
    best = 32'h7fffffff; sad_best = 32'h7fffffff; sad_arg_y = 0; sad_arg_x = 0;
    for (int iy = -3; iy <= 3; iy++)
      for (int ix = -3; ix <= 3; ix++) begin
        cs = sad(h, w, iy, ix);
        c  = cs + rate(lam, mvx, mvy, iy, ix);
        if (c < best) best = c;
        if (cs < sad_best) begin sad_best = cs; sad_arg_y = iy; sad_arg_x = ix; end
      end
    @(negedge clk);
    blk_w = 5'(w); blk_h = 5'(h); mvd_x = mvd_t'(mvx); mvd_y = mvd_t'(mvy);
    lambda = lambda_t'(lam); start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    // a second start while busy must be ignored
    repeat (3) @(negedge clk);
    if (busy) begin
      blk_w = 5'd4; blk_h = 5'd4; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n_ignored_start++;
    end
    while (!done) @(negedge clk);
    lat = cycle - t0;
    check(lat == longint'((h + 6) * (w + 6) / P + PIPE),
          $sformatf("%0dx%0d latency %0d", h, w, lat));
    check(int'(result.cost) == best,
          $sformatf("%0dx%0d off(%0d,%0d) cost %0d expected %0d", h, w, dy, dx, result.cost, best));
    c = sad(h, w, int'(result.dy), int'(result.dx)) +
        rate(lam, mvx, mvy, int'(result.dy), int'(result.dx));
    check(c == best, $sformatf("offset (%0d,%0d) has cost %0d, not the minimum %0d",
                               result.dy, result.dx, c, best));
    check(int'(result.mvd_x) == mvx + int'(result.dx) && int'(result.mvd_y) == mvy + int'(result.dy),
          "refined mvd");
    qd = 2 * int'(result.dy > 0) + int'(result.dx > 0);
    n_quad[qd]++;
    if (sad_arg_y != int'(result.dy) || sad_arg_x != int'(result.dx)) n_rate_changed++;
    sidx = (h == 4) ? 0 : (h == 8 && w == 8) ? 1 : (h == 16 && w == 16) ? 2 : (h == 8) ? 3 : 4;
    n_size[sidx]++;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // exact matches at offsets of every quadrant, lambda = 0
    run_one(8, 8,  -2, -1, 0, 0, 0, 0);
    run_one(8, 8,  -1,  2, 0, 0, 4, -4);
    run_one(16, 16, 3, -3, 0, 0, 0, 0);
    run_one(4, 4,   2,  1, 0, 0, 0, 0);
    run_one(8, 16,  0,  0, 0, 0, 0, 0);
    run_one(16, 8,  1,  3, 0, 0, 0, 0);
    // noisy blocks with a rate term
    run_one(8, 8,   2,  2, 6, 40, 12, -9);
    run_one(16, 16, -3, 3, 4, 30, 0, 0);
    run_one(4, 4,   3,  3, 8, 200, 0, 0);
    for (int k = 0; k < 24; k++) begin
      int sz;
      sz = k % 3;
      run_one(4 << sz, 4 << sz, $urandom_range(0, 6) - 3, $urandom_range(0, 6) - 3,
              $urandom_range(0, 10), $urandom_range(0, 60),
              $urandom_range(0, 40) - 20, $urandom_range(0, 40) - 20);
    end
    for (int k = 0; k < 5; k++)
      check(n_size[k] > 0, $sformatf("block size class %0d never run", k));
    for (int k = 0; k < 4; k++)
      check(n_quad[k] > 0, $sformatf("quadrant %0d never won", k));
    check(n_rate_changed > 0, "rate term never changed a decision");
    check(n_ignored_start > 0, "start while busy never exercised");
    $display("mechanisms: sizes %0d %0d %0d %0d %0d quadrants %0d %0d %0d %0d rate-changed %0d ignored-start %0d",
             n_size[0], n_size[1], n_size[2], n_size[3], n_size[4],
             n_quad[0], n_quad[1], n_quad[2], n_quad[3], n_rate_changed, n_ignored_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
