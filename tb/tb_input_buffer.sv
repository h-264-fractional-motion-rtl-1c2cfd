// tb_input_buffer: writes random pixels at random addresses of a 22x22
// buffer with 2 read ports (also writes outside the array, which must be
// dropped), then reads random addresses on both ports and compares, one
// cycle later, with a shadow copy kept by the bench. Out-of-range reads
// must return 0.
module tb_input_buffer;
  import fme_pkg::*;

  localparam int ROWS = 22, COLS = 22, NRD = 2;
  logic clk = 1'b0, wr_en = 1'b0;
  logic [4:0] wr_row = '0, wr_col = '0;
  pix_t wr_data = '0;
  logic [4:0] rd_row [NRD], rd_col [NRD];
  pix_t rd_data [NRD];
  int shadow [32][32];
  int checks = 0, failures = 0;

  input_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < NRD; k++) begin rd_row[k] = '0; rd_col[k] = '0; end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_row = 5'(r); wr_col = 5'(c); wr_data = pix_t'($urandom_range(0, 255));
        shadow[r][c] = int'(wr_data);
      end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      wr_en = 1'b1;
      wr_row = 5'($urandom_range(0, 31)); wr_col = 5'($urandom_range(0, 31));
      wr_data = pix_t'($urandom_range(0, 255));
      if (wr_row < ROWS && wr_col < COLS) shadow[wr_row][wr_col] = int'(wr_data);
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      int er [NRD], ec [NRD];
      for (int k = 0; k < NRD; k++) begin
        rd_row[k] = 5'($urandom_range(0, 23)); rd_col[k] = 5'($urandom_range(0, 23));
        er[k] = rd_row[k]; ec[k] = rd_col[k];
      end
      @(negedge clk);
      for (int k = 0; k < NRD; k++) begin
        int exp;
        exp = (er[k] < ROWS && ec[k] < COLS) ? shadow[er[k]][ec[k]] : 0;
        checks++;
        if (int'(rd_data[k]) != exp) begin
          failures++; $display("FAIL: port %0d (%0d,%0d) = %0d expected %0d", k, er[k], ec[k], rd_data[k], exp);
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
