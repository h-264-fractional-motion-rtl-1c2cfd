// input_buffer: on-chip pixel buffer written by the host, read in parallel.
//
// The host (the processor running integer motion estimation) writes the
// block's pixels one byte at a time, addressed by row and column; the
// coprocessor reads NRD pixels per cycle, each at its own row and column, so
// P reference pixels of a raster line, or P current pixels of a block line,
// come out together. One instance holds the integer reference window, one the
// current block. Reads are synchronous: rd_data is valid the cycle after
// rd_addr. Addresses outside ROWS x COLS read as 0 and writes to them are
// dropped. The buffers follow the prototype's input buffers that the host
// fills before a refinement; their organisation is this design's choice.
module input_buffer
  import fme_pkg::*;
#(
  parameter int unsigned ROWS = 22,
  parameter int unsigned COLS = 22,
  parameter int unsigned NRD  = 2
)(
  input  logic clk,
  input  logic wr_en,
  input  logic [$clog2(ROWS)-1:0] wr_row,
  input  logic [$clog2(COLS)-1:0] wr_col,
  input  pix_t wr_data,
  input  logic [$clog2(ROWS)-1:0] rd_row [NRD],
  input  logic [$clog2(COLS)-1:0] rd_col [NRD],
  output pix_t rd_data [NRD]
);

  pix_t mem [ROWS][COLS];

  always_ff @(posedge clk)
    if (wr_en && 32'(wr_row) < ROWS && 32'(wr_col) < COLS)
      mem[wr_row][wr_col] <= wr_data;

  always_ff @(posedge clk)
    for (int k = 0; k < NRD; k++)
      if (32'(rd_row[k]) < ROWS && 32'(rd_col[k]) < COLS)
        rd_data[k] <= mem[rd_row[k]][rd_col[k]];
      else
        rd_data[k] <= '0;

endmodule
