// pe_matrix: 7x7 systolic SAD matrix for quarter-pel full search.
//
// Instead of broadcasting the current pixel and shifting the dense sub-pel
// reference through registers, the matrix receives the 16 quarter samples of
// one integer reference position (u,v) per lane and spreads them over the
// PEs, while the current block is propagated: PE (dy,dx) compares reference
// quarter sample (4u+g, 4v+h) with current pixel x1(u-di, v-dj), where
// dy = 4*di + g and dx = 4*dj + h (di, dj in {0,1}; g, h in -3..0). The
// integer shift (di,dj) defines four quadrants of 16, 12, 12 and 9 PEs:
//   quadrant 0 (di=0,dj=0) uses x1(u,v)     - the incoming pixel,
//   quadrant 1 (di=0,dj=1) uses x1(u,v-1)   - delayed by one pixel,
//   quadrant 2 (di=1,dj=0) uses x1(u-1,v)   - delayed by one block-window row,
//   quadrant 3 (di=1,dj=1) uses x1(u-1,v-1) - delayed by a row and a pixel.
// The one-row delay is a line memory indexed by column group (one P-pixel word
// per group), the one-pixel delay comes from the neighbouring lane or from
// the last lane of the previous beat. Each current pixel carries an enable,
// low outside the block, so every PE sums exactly the pixels of the block.
//
// Interface: in_valid/in_cg/ref_q/cur_pix/cur_en describe one beat (P lanes of
// positions (u, v..v+P-1)); init loads every accumulator with its rate cost.
// Timing: sad[][] is updated one cycle after the beat. Line memory depth and
// lane arrangement are this implementation's choices.
module pe_matrix
  import fme_pkg::*;
#(
  parameter int unsigned P     = 2,
  parameter int unsigned MAX_W = 16
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  cost_t init_cost [NSIDE][NSIDE],
  input  logic  in_valid,
  input  logic [$clog2((MAX_W+2*MARGIN+P-1)/P)-1:0] in_cg,
  input  pix_t  ref_q   [P][ACC][ACC],
  input  pix_t  cur_pix [P],
  input  logic  cur_en  [P],
  output cost_t sad     [NSIDE][NSIDE]
);

  localparam int unsigned NG = (MAX_W + 2*MARGIN + P - 1) / P;

  typedef struct packed {
    logic en;
    pix_t pix;
  } cur_t;

  cur_t row_mem [NG][P];      // current pixels of the previous window row
  cur_t prev_cur, prev_up;    // last lane of the previous beat, this row / previous row
  cur_t c00 [P], c01 [P], c10 [P], c11 [P];

  always_comb begin
    for (int l = 0; l < P; l++) begin
      c00[l] = '{en: cur_en[l] & in_valid, pix: cur_pix[l]};
      c10[l] = row_mem[in_cg][l];
      c10[l].en = c10[l].en & in_valid;
    end
    for (int l = 0; l < P; l++) begin
      c01[l] = (l == 0) ? prev_cur : c00[(l == 0) ? 0 : l-1];
      c11[l] = (l == 0) ? prev_up  : c10[(l == 0) ? 0 : l-1];
      c01[l].en = c01[l].en & in_valid;
      c11[l].en = c11[l].en & in_valid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_cur <= '0;
      prev_up  <= '0;
    end else if (in_valid) begin
      prev_cur <= '{en: cur_en[P-1], pix: cur_pix[P-1]};
      prev_up  <= row_mem[in_cg][P-1];
    end
  end

  // The enables are cleared at reset so the first rows read nothing stale.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NG; g++)
        for (int l = 0; l < P; l++)
          row_mem[g][l] <= '0;
    end else if (in_valid) begin
      for (int l = 0; l < P; l++)
        row_mem[in_cg][l] <= '{en: cur_en[l], pix: cur_pix[l]};
    end
  end

  // The PE array.
  for (genvar iy = 0; iy < NSIDE; iy++) begin : g_row
    for (genvar ix = 0; ix < NSIDE; ix++) begin : g_col
      localparam int DI = (iy > RANGE) ? 1 : 0;
      localparam int DJ = (ix > RANGE) ? 1 : 0;
      localparam int QA = iy - ACC * DI;     // quarter row index within the square
      localparam int QB = ix - ACC * DJ;     // quarter column index within the square
      pix_t rp [P];
      pix_t cp [P];
      logic ce [P];
      always_comb
        for (int l = 0; l < P; l++) begin
          rp[l] = ref_q[l][QA][QB];
          unique case ({DI[0], DJ[0]})
            2'b00:   begin cp[l] = c00[l].pix; ce[l] = c00[l].en; end
            2'b01:   begin cp[l] = c01[l].pix; ce[l] = c01[l].en; end
            2'b10:   begin cp[l] = c10[l].pix; ce[l] = c10[l].en; end
            default: begin cp[l] = c11[l].pix; ce[l] = c11[l].en; end
          endcase
        end
      pe #(.P(P)) u_pe (
        .clk      (clk),
        .init     (init),
        .init_cost(init_cost[iy][ix]),
        .ref_pix  (rp),
        .cur_pix  (cp),
        .en       (ce),
        .sad      (sad[iy][ix])
      );
    end
  end

endmodule
