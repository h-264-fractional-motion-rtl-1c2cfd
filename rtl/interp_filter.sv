// interp_filter: on-the-fly quarter-pel interpolation of the reference window.
//
// The integer-pel reference window arrives in raster order, P pixels per beat,
// starting at its top-left corner. Five line buffers hold the previous five
// rows (one P-pixel word per column group, read and rewritten at the column
// group of the incoming beat, so they map onto a single-port RAM), and a
// column shift register holds the last 5+P six-pixel columns. From these the
// filter forms, for every incoming pixel, the 6x6 integer patch whose
// bottom-right corner is that pixel, and a qpel_cell per lane turns the patch
// into 16 quarter-pel samples. Once the first five rows and five columns have
// been read, every input pixel therefore produces 16 quarter samples and every
// beat 16*P, as the design requires; samples are never stored.
//
// Output lane l of a beat that brought window pixel (R, C) carries the 16
// samples of integer position (R-5, C-5) relative to the window origin; the
// caller discards lanes whose position lies outside the search area. Column
// groups restart at 0 on every row; in_cg is the group index of the beat.
// When the window width is not a multiple of P, the last beat of a row is
// padded; the padded lanes only yield positions the caller discards.
//
// Timing: fixed latency LAT = 3 cycles from in_valid to out_valid; tag bits
// travel with the data. Line buffer layout and latency are this
// implementation's choices. All lanes are in step, so only lane 0's valid is
// used.
module interp_filter
  import fme_pkg::*;
#(
  parameter int unsigned P     = 2,    // input pixels per clock cycle
  parameter int unsigned MAX_W = 16,   // widest block supported
  parameter int unsigned TAG_W = 8     // side information carried with a beat
)(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic [$clog2((MAX_W+2*MARGIN+P-1)/P)-1:0] in_cg,
  input  pix_t in_pix [P],
  input  logic [TAG_W-1:0] in_tag,
  output logic out_valid,
  output pix_t q [P][ACC][ACC],
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned NG   = (MAX_W + 2*MARGIN + P - 1) / P;  // column groups per row
  localparam int unsigned NCOL = TAPS - 1 + P;                     // columns in the shift register
  localparam int unsigned LAT  = 3;

  typedef pix_t col_t [TAPS];                 // one column, [0] oldest row

  pix_t rowbuf [TAPS-1][NG][P];               // [0] = previous row, [4] = five rows back
  col_t colwin [NCOL];                        // [0] oldest column
  logic win_valid;
  logic [TAG_W-1:0] tag_d [LAT];

  // New columns formed from the line buffers and the incoming pixels.
  col_t newcol [P];
  always_comb begin
    for (int l = 0; l < P; l++) begin
      for (int r = 0; r < TAPS - 1; r++)
        newcol[l][r] = rowbuf[TAPS-2-r][in_cg][l];
      newcol[l][TAPS-1] = in_pix[l];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int l = 0; l < P; l++) begin
        rowbuf[0][in_cg][l] <= in_pix[l];
        for (int k = 1; k < TAPS - 1; k++)
          rowbuf[k][in_cg][l] <= rowbuf[k-1][in_cg][l];
      end
      for (int c = 0; c < NCOL - P; c++)
        colwin[c] <= colwin[c+P];
      for (int l = 0; l < P; l++)
        colwin[NCOL-P+l] <= newcol[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win_valid <= 1'b0;
    else        win_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    tag_d[0] <= in_tag;
    for (int k = 1; k < LAT; k++) tag_d[k] <= tag_d[k-1];
  end
  assign out_tag = tag_d[LAT-1];

  // One quarter-pel cell per lane; lane l uses columns l .. l+5.
  logic [P-1:0] lane_valid;
  for (genvar l = 0; l < P; l++) begin : g_lane
    pix_t patch [TAPS][TAPS];
    always_comb
      for (int r = 0; r < TAPS; r++)
        for (int c = 0; c < TAPS; c++)
          patch[r][c] = colwin[l+c][r];
    qpel_cell u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (win_valid),
      .patch    (patch),
      .out_valid(lane_valid[l]),
      .q        (q[l])
    );
  end
  assign out_valid = lane_valid[0];

endmodule
