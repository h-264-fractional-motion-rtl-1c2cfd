// tb_fme_720p: HD workload at the default parameters (P = 2).
//
// A synthetic 1280x720 reference frame is refined block by block as an
// encoder would do: once as 14400 8x8 blocks and once as 3600 16x16
// blocks. Each block has a smooth "true" motion in quarter pels; the integer part stands in for the integer
// search result, and the current block is the reference interpolated at the
// true motion plus a little noise. As in a two-stage pipeline where the
// integer search of a block overlaps the refinement of its left neighbour,
// the vector predictor is the left block's integer vector. Every result is
// checked against the behavioural model (minimum Lagrangian cost), and the
// refinement cycles of the whole frame are measured (host loading excluded)
// and converted to a frame time at a 133 MHz clock, which must fit the
// 1/60 s frame period.
module tb_fme_720p;
  import fme_pkg::*;
  import fme_ref_pkg::*;

  localparam int FW = 1280, MARG = 24, STRIP = 720;
  localparam real FCLK_MHZ = 133.0;

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

  int frame [STRIP + 2*MARG][FW + 2*MARG];
  int checks = 0, failures = 0, exact = 0;
  longint cycle = 0;
  longint cyc8 = 0, cyc16 = 0;
  int n8 = 0, n16 = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int F(int y, int x);
    return frame[y + MARG][x + MARG];
  endfunction

  task automatic refine(int n, int by, int bx, int tmy, int tmx, int left_imy, int left_imx,
                        output int imy, output int imx);
    int best, c;
    longint t0;
    // integer part of the true motion, rounded to nearest
    imy = (tmy >= 0) ? (tmy + 2) / 4 : -((-tmy + 1) / 4);
    imx = (tmx >= 0) ? (tmx + 2) / 4 : -((-tmx + 1) / 4);
    for (int y = -3; y < n + 3; y++)
      for (int x = -3; x < n + 3; x++)
        win[y + OFF][x + OFF] = F(by + imy + y, bx + imx + x);
    cur_from_ref(n, n, tmy - 4 * imy, tmx - 4 * imx, 2);
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
        c = sad(n, n, iy, ix) + rate(4, 4 * (imx - left_imx), 4 * (imy - left_imy), iy, ix);
        if (c < best) best = c;
      end
    blk_w = 5'(n); blk_h = 5'(n); lambda = 16'd4;
    mvd_x = mvd_t'(4 * (imx - left_imx)); mvd_y = mvd_t'(4 * (imy - left_imy));
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    if (n == 8) begin cyc8 += cycle - t0; n8++; end
    else        begin cyc16 += cycle - t0; n16++; end
    checks++;
    if (int'(result.cost) != best) begin
      failures++;
      $display("FAIL: %0dx%0d block at (%0d,%0d): cost %0d expected %0d", n, n, by, bx, result.cost, best);
    end
    if (4 * imy + int'(result.dy) == tmy && 4 * imx + int'(result.dx) == tmx) exact++;
  endtask

  initial begin
    real t8_ms, t16_ms;
    int imy, imx, ly, lx;
    for (int y = 0; y < STRIP + 2*MARG; y++)
      for (int x = 0; x < FW + 2*MARG; x++)
        frame[y][x] = (128 + (((x * 37) ^ (y * 91)) % 97) + int'($urandom_range(0, 24))) & 255;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the frame as 8x8 blocks
    for (int by = 0; by < STRIP; by += 8) begin
      ly = 0; lx = 0;
      for (int bx = 0; bx < FW; bx += 8) begin
        refine(8, by, bx, ((bx / 64) % 9) - 4 + (by / 8) % 5, ((bx / 40) % 13) - 6 + int'($urandom_range(0, 2)),
               ly, lx, imy, imx);
        ly = imy; lx = imx;
      end
    end
    // the frame as 16x16 blocks
    for (int by = 0; by < STRIP; by += 16) begin
      ly = 0; lx = 0;
      for (int bx = 0; bx < FW; bx += 16) begin
        refine(16, by, bx, ((bx / 80) % 11) - 5 + (by / 16) % 3, ((bx / 48) % 9) - 4, ly, lx, imy, imx);
        ly = imy; lx = imx;
      end
    end
    t8_ms  = real'(cyc8) / (FCLK_MHZ * 1000.0);
    t16_ms = real'(cyc16) / (FCLK_MHZ * 1000.0);
    $display("8x8:   %0d blocks, %0d cycles/block, 720p frame at %0.0f MHz: %0.2f ms",
             n8, cyc8 / n8, FCLK_MHZ, t8_ms);
    $display("16x16: %0d blocks, %0d cycles/block, 720p frame at %0.0f MHz: %0.2f ms",
             n16, cyc16 / n16, FCLK_MHZ, t16_ms);
    $display("true quarter-pel motion recovered in %0d of %0d blocks", exact, n8 + n16);
    checks += 3;
    if (t8_ms > 1000.0 / 60.0)  begin failures++; $display("FAIL: 8x8 frame does not fit 60 Hz"); end
    if (t16_ms > 1000.0 / 60.0) begin failures++; $display("FAIL: 16x16 frame does not fit 60 Hz"); end
    if (exact < (n8 + n16) / 2) begin failures++; $display("FAIL: true motion rarely recovered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
