// tb_qpel_cell: checks the 16 quarter-pel samples of qpel_cell against the
// behavioural H.264 interpolation model for random and extreme 6x6 patches
// (extremes drive the 6-tap filters into clipping), and the two-cycle latency.
module tb_qpel_cell;
  import fme_pkg::*;
  import fme_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  pix_t patch [TAPS][TAPS];
  pix_t q [ACC][ACC];
  int checks = 0, failures = 0;

  qpel_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < TAPS; r++) for (int c = 0; c < TAPS; c++) patch[r][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      // window coordinates: patch[r][c] = W(r-3+3, c-3+3) with u = v = 3
      for (int r = 0; r < TAPS; r++)
        for (int c = 0; c < TAPS; c++) begin
          int val;
          case (t % 4)
            0, 1: val = int'($urandom_range(0, 255));
            2:    val = ($urandom_range(0, 1) != 0) ? 255 : 0;
            default: val = ((r + c) % 2 != 0) ? 255 : int'($urandom_range(0, 20));
          endcase
          patch[r][c] = pix_t'(val);
          win[r + OFF][c + OFF] = val;
        end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid after one cycle"); end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: out_valid missing after two cycles"); end
      for (int a = 1; a <= 4; a++)
        for (int b = 1; b <= 4; b++) begin
          int exp;
          exp = qs(4 * 2 + a, 4 * 2 + b);
          checks++;
          if (int'(q[a-1][b-1]) != exp) begin
            failures++;
            $display("FAIL: sample (%0d,%0d) = %0d, expected %0d", a, b, q[a-1][b-1], exp);
          end
        end
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
