// tb_interp_filter: streams random reference windows (8x8, 4x4 and 16x16
// blocks, P = 2 pixels per beat, raster order, with idle gaps between beats)
// through the filter and compares every lane whose integer position lies in
// the search area with the 16 quarter samples of the behavioural model. Also
// checks the 3-cycle latency and that the tag travels with its beat.
module tb_interp_filter;
  import fme_pkg::*;
  import fme_ref_pkg::*;

  localparam int P = 2;
  localparam int MAXW = 16;
  localparam int CGW = $clog2((MAXW + 6 + P - 1) / P);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [CGW-1:0] in_cg = '0;
  pix_t in_pix [P];
  logic [15:0] in_tag = '0, out_tag;
  pix_t q [P][ACC][ACC];
  int checks = 0, failures = 0, positions = 0;
  int cur_w;
  longint cycle = 0;
  longint sent_at [65536];

  interp_filter #(.TAG_W(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Checker: the tag encodes the window row and column of lane 0.
  always @(negedge clk) if (rst_n && out_valid) begin
    int R, C;
    R = int'(out_tag[15:8]);
    C = int'(out_tag[7:0]);
    checks++;
    if (cycle - sent_at[out_tag] != 3) begin
      failures++; $display("FAIL: latency %0d", cycle - sent_at[out_tag]);
    end
    for (int l = 0; l < P; l++) begin
      int u, v;
      u = R - 5; v = C + l - 5;
      if (u >= 0 && v >= 0) begin
        positions++;
        for (int a = 1; a <= 4; a++)
          for (int b = 1; b <= 4; b++) begin
            int exp;
            exp = qs(4 * (u - 1) + a, 4 * (v - 1) + b);
            checks++;
            if (int'(q[l][a-1][b-1]) != exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL: pos (%0d,%0d) lane %0d q(%0d,%0d)=%0d exp %0d", u, v, l, a, b, q[l][a-1][b-1], exp);
            end
          end
      end
    end
  end

  task automatic stream(int n);
    cur_w = n;
    rand_window(1'b0);
    for (int R = 0; R < n + 6; R++)
      for (int g = 0; g < (n + 6) / P; g++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_cg = CGW'(g);
        for (int l = 0; l < P; l++) in_pix[l] = pix_t'(W(R - 3, g * P + l - 3));
        in_tag = {8'(R), 8'(g * P)};
        sent_at[in_tag] = cycle;
        if ($urandom_range(0, 5) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    for (int l = 0; l < P; l++) in_pix[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    stream(8);
    stream(4);
    stream(16);
    stream(8);
    checks++;
    if (positions != 2 * 81 + 25 + 289) begin
      failures++; $display("FAIL: %0d positions checked", positions);
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
