// qpel_cell: the sixteen quarter-pel samples that belong to one integer
// reference pixel, computed from the 6x6 integer-pixel patch around it.
//
// For the integer position N = W(u,v) the cell delivers the samples at
// quarter-pel offsets (1..4, 1..4) from W(u-1,v-1), i.e. the 4x4 square of
// the quarter-pel grid whose bottom-right corner is the pixel itself. Every
// input pixel therefore yields 16 samples, as in the design's scheduling of
// sub-pixel availability. Patch row r / column c holds W(u-3+r, v-3+c).
//
// Arithmetic is the H.264 luma interpolation: half-pel samples with the
// 6-tap kernel (1,-5,20,20,-5,1) and rounding (+16)>>5, the centre half-pel
// sample from unrounded horizontal intermediates with (+512)>>10, and
// quarter-pel samples as the rounded mean of the two nearest integer or
// half-pel samples (horizontal, vertical or diagonal pairs as the standard
// prescribes).
//
// Timing: two register stages. Stage 1 holds the integer and half-pel
// samples, stage 2 the 16 quarter samples. out_valid follows in_valid by two
// cycles; there is no stall. The split into two stages is this design's
// choice.
module qpel_cell
  import fme_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t patch [TAPS][TAPS],     // [row][col]
  output logic out_valid,
  output pix_t q [ACC][ACC]            // [a-1][b-1], quarter offsets a (down), b (right)
);

  // ---------------- stage 1: integer and half-pel samples ----------------
  pix_t s1_H, s1_M, s1_N;              // W(u-1,v) W(u,v-1) W(u,v)
  pix_t s1_b, s1_s;                     // horizontal half-pel of rows u-1, u
  pix_t s1_h, s1_m;                     // vertical half-pel of columns v-1, v
  pix_t s1_j;                           // centre half-pel
  logic s1_valid;

  logic signed [19:0] hraw [TAPS];      // unrounded horizontal intermediate per row
  logic signed [19:0] vraw_h, vraw_m, jraw;

  function automatic logic signed [19:0] px(input pix_t p);
    return 20'(signed'({12'd0, p}));
  endfunction

  always_comb begin
    for (int r = 0; r < TAPS; r++)
      hraw[r] = tap6(px(patch[r][0]), px(patch[r][1]), px(patch[r][2]),
                     px(patch[r][3]), px(patch[r][4]), px(patch[r][5]));
    vraw_h = tap6(px(patch[0][2]), px(patch[1][2]), px(patch[2][2]),
                  px(patch[3][2]), px(patch[4][2]), px(patch[5][2]));
    vraw_m = tap6(px(patch[0][3]), px(patch[1][3]), px(patch[2][3]),
                  px(patch[3][3]), px(patch[4][3]), px(patch[5][3]));
    jraw   = tap6(hraw[0], hraw[1], hraw[2], hraw[3], hraw[4], hraw[5]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      {s1_H, s1_M, s1_N, s1_b, s1_s, s1_h, s1_m, s1_j} <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_H <= patch[2][3];
      s1_M <= patch[3][2];
      s1_N <= patch[3][3];
      s1_b <= clip_pix((hraw[2] + 20'sd16) >>> 5);
      s1_s <= clip_pix((hraw[3] + 20'sd16) >>> 5);
      s1_h <= clip_pix((vraw_h + 20'sd16) >>> 5);
      s1_m <= clip_pix((vraw_m + 20'sd16) >>> 5);
      s1_j <= clip_pix((jraw + 20'sd512) >>> 10);
    end
  end

  // ---------------- stage 2: quarter-pel samples ----------------
  pix_t qn [ACC][ACC];
  always_comb begin
    // row 1 (quarter offset 1 below G)
    qn[0][0] = avg2(s1_b, s1_h);        // e
    qn[0][1] = avg2(s1_b, s1_j);        // f
    qn[0][2] = avg2(s1_b, s1_m);        // g
    qn[0][3] = avg2(s1_H, s1_m);        // d of the cell to the right
    // row 2 (half-pel row)
    qn[1][0] = avg2(s1_h, s1_j);        // i
    qn[1][1] = s1_j;                    // j
    qn[1][2] = avg2(s1_j, s1_m);        // k
    qn[1][3] = s1_m;                    // m
    // row 3
    qn[2][0] = avg2(s1_h, s1_s);        // p
    qn[2][1] = avg2(s1_j, s1_s);        // q
    qn[2][2] = avg2(s1_m, s1_s);        // r
    qn[2][3] = avg2(s1_N, s1_m);        // n of the cell to the right
    // row 4 (integer row of N)
    qn[3][0] = avg2(s1_M, s1_s);        // a of the cell below
    qn[3][1] = s1_s;                    // s
    qn[3][2] = avg2(s1_N, s1_s);        // c of the cell below
    qn[3][3] = s1_N;                    // integer pixel
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int a = 0; a < ACC; a++)
        for (int b = 0; b < ACC; b++)
          q[a][b] <= '0;
    end else begin
      out_valid <= s1_valid;
      q <= qn;
    end
  end

endmodule
