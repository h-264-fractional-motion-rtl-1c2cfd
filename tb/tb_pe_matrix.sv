// tb_pe_matrix: feeds the 7x7 SAD matrix with beats laid out as the
// coprocessor produces them (P = 2 lanes per beat, window rows of (w+6)/P
// beats, lane l of a beat in window row R and column group g carrying the
// quarter samples of integer position (R-5, g*P+l-5) from the behavioural
// model, and the current pixel of that position with its enable). After the
// last beat every one of the 49 accumulators must equal its random initial
// cost plus the SAD of its candidate computed directly by the model. Runs
// 8x8, 4x4, 16x16, 16x8 and 8x16 blocks back to back, with idle gaps.
module tb_pe_matrix;
  import fme_pkg::*;
  import fme_ref_pkg::*;

  localparam int P = 2;
  localparam int MAXW = 16;
  localparam int CGW = $clog2((MAXW + 6 + P - 1) / P);

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, in_valid = 1'b0;
  cost_t init_cost [NSIDE][NSIDE];
  logic [CGW-1:0] in_cg = '0;
  pix_t ref_q [P][ACC][ACC];
  pix_t cur_pix [P];
  logic cur_en [P];
  cost_t sad [NSIDE][NSIDE];
  int checks = 0, failures = 0;

  pe_matrix dut (.*);
  always #5 clk = ~clk;

  task automatic run_block(int h, int w);
    rand_window(1'b0);
    for (int k = 0; k < 16; k++) for (int l = 0; l < 16; l++) cur[k][l] = int'($urandom_range(0, 255));
    @(negedge clk);
    init = 1'b1;
    for (int iy = 0; iy < NSIDE; iy++)
      for (int ix = 0; ix < NSIDE; ix++) init_cost[iy][ix] = cost_t'($urandom_range(0, 5000));
    @(negedge clk);
    init = 1'b0;
    for (int R = 0; R < h + 6; R++)
      for (int g = 0; g < (w + 6) / P; g++) begin
        in_valid = 1'b1;
        in_cg = CGW'(g);
        for (int l = 0; l < P; l++) begin
          int u, v;
          u = R - 5; v = g * P + l - 5;
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 4; b++)
              ref_q[l][a][b] = pix_t'((u >= 0 && v >= 0) ? qs(4 * (u - 1) + a + 1, 4 * (v - 1) + b + 1)
                                                         : int'($urandom_range(0, 255)));
          cur_en[l]  = (u >= 0 && u < h && v >= 0 && v < w);
          cur_pix[l] = cur_en[l] ? pix_t'(cur[u][v]) : pix_t'($urandom_range(0, 255));
        end
        @(negedge clk);
        if ($urandom_range(0, 4) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
      end
    in_valid = 1'b0;
    @(negedge clk);
    for (int iy = 0; iy < NSIDE; iy++)
      for (int ix = 0; ix < NSIDE; ix++) begin
        int exp;
        exp = fme_ref_pkg::sad(h, w, iy - 3, ix - 3);
        checks++;
        if (longint'(sad[iy][ix]) != longint'(init_cost[iy][ix]) + longint'(exp)) begin
          failures++;
          $display("FAIL: %0dx%0d cand (%0d,%0d) = %0d expected %0d + %0d", h, w, iy - 3, ix - 3,
                   sad[iy][ix], init_cost[iy][ix], exp);
        end
      end
  endtask

  initial begin
    for (int iy = 0; iy < NSIDE; iy++) for (int ix = 0; ix < NSIDE; ix++) init_cost[iy][ix] = '0;
    for (int l = 0; l < P; l++) begin cur_pix[l] = '0; cur_en[l] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_block(8, 8);
    run_block(4, 4);
    run_block(16, 16);
    run_block(16, 8);
    run_block(8, 16);
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
