// fme_coprocessor: quarter-pel motion-vector refinement for H.264 encoding.
//
// Given the integer-pel best match of a block (found elsewhere, e.g. by
// software integer motion estimation), the coprocessor evaluates all 49
// quarter-pel displacements within +-3/4 pel of it and returns the one with
// the lowest Lagrangian cost SAD + lambda * R(mvd). Sub-pel samples are
// interpolated on the fly and consumed at once, never stored:
//
//   input_buffer (reference window) --P px/cycle--> interp_filter --16*P
//   quarter samples--> pe_matrix (7x7 PEs, 4 quadrants) --> decision_tree
//   input_buffer (current block) ---------------------^        ^
//   lagrange_cost (rate term, loaded into the PE accumulators at start-up)
//
// Host interface: before start, write the reference window ((h+6) x (w+6)
// integer pixels, top-left at (-3,-3) relative to the integer best match) with
// wr_sel = 1 and the current block (h x w) with wr_sel = 0. Then pulse start
// with the block size blk_w/blk_h (4, 8 or 16 each; no hardware change between
// sizes), the differentially coded integer motion vector mvd_x/mvd_y (quarter
// pels) and lambda. busy stays high until done pulses; result then holds the
// best offset, its cost and the refined mvd (mvd + offset).
//
// Timing: one beat of P window pixels is read per cycle in raster order,
// (h+6)*ceil((w+6)/P) beats (lanes past the end of a row carry nothing
// useful and are discarded), followed by a fixed pipeline: done is high in
// cycle (h+6)*ceil((w+6)/P) + 8 counting the cycle that samples start as cycle 1, i.e.
// 106 cycles for 8x8 with P = 2 (the design reports 112 for that case) and
// 250 for 16x16. Pipeline after the last beat: buffer read 1, column window 1,
// half-pel stage 1, quarter-pel stage 1, PE accumulate 1, decision tree 3.
// Start is ignored while busy. The block-level organisation follows the
// design; the host interface, buffer layout and control sequencing are this
// implementation's choices. Reset is asynchronous throughout; lint reports
// rst_n as also used synchronously only because the handshake assertion at
// the end uses it in its disable condition.
module fme_coprocessor
  import fme_pkg::*;
#(
  parameter int unsigned P     = 2,    // reference pixels per cycle
  parameter int unsigned MAX_W = 16    // largest block side
)(
  input  logic        clk,
  input  logic        rst_n,
  // host write port to the input buffers
  input  logic        wr_en,
  input  logic        wr_sel,          // 1 = reference window, 0 = current block
  input  logic [4:0]  wr_row,
  input  logic [4:0]  wr_col,
  input  pix_t        wr_data,
  // command
  input  logic        start,
  input  logic [4:0]  blk_w,
  input  logic [4:0]  blk_h,
  input  mvd_t        mvd_x,
  input  mvd_t        mvd_y,
  input  lambda_t     lambda,
  output logic        busy,
  output logic        done,
  output fme_result_t result
);

  localparam int unsigned WIN  = MAX_W + 2 * MARGIN;        // window side
  localparam int unsigned NG   = (WIN + P - 1) / P;         // column groups per row
  localparam int unsigned CG_W = $clog2(NG);
  localparam int unsigned RW   = $clog2(WIN);
  localparam int unsigned BW   = $clog2(MAX_W);
  localparam int unsigned FILL = TAPS - 1;                  // rows/columns before the first position

  // ---------------- control: beat generation ----------------
  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN} state_t;
  state_t state;

  logic [4:0]      bw, bh;             // latched block size
  mvd_t            mvx, mvy;
  logic [RW-1:0]   row;                // window row of the beat
  logic [CG_W-1:0] cg;                 // column group of the beat
  logic [CG_W-1:0] ng_row;             // column groups in this block's window row
  logic            beat;

  assign beat = (state == S_READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      bw     <= '0;
      bh     <= '0;
      mvx    <= '0;
      mvy    <= '0;
      row    <= '0;
      cg     <= '0;
      ng_row <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (start) begin
            state  <= S_READ;
            bw     <= blk_w;
            bh     <= blk_h;
            mvx    <= mvd_x;
            mvy    <= mvd_y;
            row    <= '0;
            cg     <= '0;
            ng_row <= CG_W'((int'(blk_w) + 2 * MARGIN + int'(P) - 1) / P);
          end
        S_READ:
          if (cg == ng_row - 1'b1) begin
            cg <= '0;
            if (int'(row) == int'(bh) + 2 * MARGIN - 1) state <= S_DRAIN;
            else row <= row + 1'b1;
          end else begin
            cg <= cg + 1'b1;
          end
        S_DRAIN:
          if (done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
  assign busy = (state != S_IDLE);

  // Addresses of the beat: P window pixels and the P current pixels of the
  // positions they complete.
  logic [RW-1:0] ref_row [P];
  logic [RW-1:0] ref_col [P];
  logic [BW-1:0] cur_row [P];
  logic [BW-1:0] cur_col [P];
  logic          cur_ok  [P];
  always_comb begin
    for (int l = 0; l < P; l++) begin
      int u, v;
      u = int'(row) - int'(FILL);
      v = int'(cg) * int'(P) + l - int'(FILL);
      ref_row[l] = row;
      ref_col[l] = RW'(int'(cg) * int'(P) + l);
      cur_ok[l]  = beat && u >= 0 && u < int'(bh) && v >= 0 && v < int'(bw);
      cur_row[l] = cur_ok[l] ? BW'(u) : '0;
      cur_col[l] = cur_ok[l] ? BW'(v) : '0;
    end
  end

  // Last beat of window row h+4 (all positions u = h-1 issued) and last beat.
  logic beat_half, beat_last;
  assign beat_half = beat && cg == ng_row - 1'b1 && int'(row) == int'(bh) + FILL - 1;
  assign beat_last = beat && cg == ng_row - 1'b1 && int'(row) == int'(bh) + 2 * MARGIN - 1;

  // ---------------- input buffers ----------------
  pix_t ref_pix [P];
  pix_t cur_pix [P];

  input_buffer #(.ROWS(WIN), .COLS(WIN), .NRD(P)) u_ref_buf (
    .clk    (clk),
    .wr_en  (wr_en && wr_sel),
    .wr_row (RW'(wr_row)),
    .wr_col (RW'(wr_col)),
    .wr_data(wr_data),
    .rd_row (ref_row),
    .rd_col (ref_col),
    .rd_data(ref_pix)
  );

  input_buffer #(.ROWS(MAX_W), .COLS(MAX_W), .NRD(P)) u_cur_buf (
    .clk    (clk),
    .wr_en  (wr_en && !wr_sel),
    .wr_row (BW'(wr_row)),
    .wr_col (BW'(wr_col)),
    .wr_data(wr_data),
    .rd_row (cur_row),
    .rd_col (cur_col),
    .rd_data(cur_pix)
  );

  // Beat side information, aligned with the buffer outputs.
  typedef struct packed {
    logic            half;
    logic            last;
    logic [CG_W-1:0] cg;
    logic [P-1:0]    en;
  } side_t;

  logic  b_valid;
  side_t b_side;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_side  <= '0;
    end else begin
      b_valid     <= beat;
      b_side.half <= beat_half;
      b_side.last <= beat_last;
      b_side.cg   <= cg;
      for (int l = 0; l < P; l++) b_side.en[l] <= cur_ok[l];
    end
  end

  // ---------------- interpolation filter ----------------
  localparam int unsigned TAG_W = $bits(side_t) + P * PIX_W;
  logic [TAG_W-1:0] f_tag_in, f_tag_out;
  logic             f_valid;
  pix_t             f_q [P][ACC][ACC];
  side_t            f_side;
  pix_t             f_cur [P];
  logic             f_en  [P];

  always_comb begin
    f_tag_in = TAG_W'(b_side);
    for (int l = 0; l < P; l++)
      f_tag_in[$bits(side_t) + l*PIX_W +: PIX_W] = cur_pix[l];
    f_side = side_t'(f_tag_out[$bits(side_t)-1:0]);
    for (int l = 0; l < P; l++) begin
      f_cur[l] = f_tag_out[$bits(side_t) + l*PIX_W +: PIX_W];
      f_en[l]  = f_side.en[l];
    end
  end

  interp_filter #(.P(P), .MAX_W(MAX_W), .TAG_W(TAG_W)) u_filter (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (b_valid),
    .in_cg    (b_side.cg),
    .in_pix   (ref_pix),
    .in_tag   (f_tag_in),
    .out_valid(f_valid),
    .q        (f_q),
    .out_tag  (f_tag_out)
  );

  // ---------------- Lagrangian cost ----------------
  cost_t cand_cost [NSIDE][NSIDE];
  logic  cost_done;

  lagrange_cost u_cost (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start && state == S_IDLE),
    .mvd_x    (mvd_x),
    .mvd_y    (mvd_y),
    .lambda   (lambda),
    .busy     (),
    .done     (cost_done),
    .cand_cost(cand_cost)
  );

  // ---------------- PE matrix ----------------
  cost_t sad [NSIDE][NSIDE];

  pe_matrix #(.P(P), .MAX_W(MAX_W)) u_matrix (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (cost_done),
    .init_cost(cand_cost),
    .in_valid (f_valid),
    .in_cg    (f_side.cg),
    .ref_q    (f_q),
    .cur_pix  (f_cur),
    .cur_en   (f_en),
    .sad      (sad)
  );

  // Quadrant completion, one cycle after the PE accumulators took the beat.
  logic half_ready, all_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_ready <= 1'b0;
      all_ready  <= 1'b0;
    end else begin
      half_ready <= f_valid && f_side.half;
      all_ready  <= f_valid && f_side.last;
    end
  end

  // ---------------- decision tree ----------------
  qoff_t best_dy, best_dx;
  cost_t best_cost;

  decision_tree u_decision (
    .clk       (clk),
    .rst_n     (rst_n),
    .sad       (sad),
    .half_ready(half_ready),
    .all_ready (all_ready),
    .done      (done),
    .best_dy   (best_dy),
    .best_dx   (best_dx),
    .best_cost (best_cost)
  );

  assign result = '{dy: best_dy, dx: best_dx, cost: best_cost,
                    mvd_y: mvy + mvd_t'(best_dy), mvd_x: mvx + mvd_t'(best_dx)};

  // The rate costs must be loaded before the first block pixel reaches the PEs.
  logic cost_loaded;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          cost_loaded <= 1'b0;
    else if (start && state == S_IDLE)   cost_loaded <= 1'b0;
    else if (cost_done)                  cost_loaded <= 1'b1;
  end

  a_cost_before_data: assert property (@(posedge clk) disable iff (!rst_n)
    (f_valid && f_side.en != '0) |-> cost_loaded)
    else $error("PE accumulation started before the rate costs were loaded");

endmodule
