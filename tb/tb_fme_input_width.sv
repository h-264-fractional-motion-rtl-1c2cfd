// tb_fme_input_width: runs the coprocessor with 1 and with 4 reference pixels
// per cycle (the default, 2, is covered by the end-to-end bench) on 8x8 and
// 16x16 blocks, checking results and cycle counts, and prints the measured
// cycles per 8x8 and 16x16 refinement for each width.
module tb_fme_input_width;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin1, fin4;
  int c1, f1, a1, b1, c4, f4, a4, b4;
  int checks, failures;

  always #5 clk = ~clk;

  fme_harness #(.P(1), .NBLK(6)) h1 (.clk, .rst_n, .go(1'b1), .finished(fin1), .checks(c1),
                                     .failures(f1), .cycles_8x8(a1), .cycles_16x16(b1));
  fme_harness #(.P(4), .NBLK(6)) h4 (.clk, .rst_n, .go(fin1), .finished(fin4), .checks(c4),
                                     .failures(f4), .cycles_8x8(a4), .cycles_16x16(b4));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin4);
    checks = c1 + c4;
    failures = f1 + f4;
    $display("P=1: 8x8 %0d cycles, 16x16 %0d cycles", a1, b1);
    $display("P=4: 8x8 %0d cycles, 16x16 %0d cycles", a4, b4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c4, f1 + f4 + 1);
    $finish;
  end
endmodule
