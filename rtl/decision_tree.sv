// decision_tree: selects the candidate with the smallest Lagrangian cost.
//
// The PE quadrants finish at different times, so at most a^2 = 16 costs are
// ever compared at once. A 16-input binary tree of comparators (4 levels)
// finds the minimum of one quadrant; its output register feeds a sequential
// comparator that keeps the running optimum. The tree is shared by the four
// quadrants: quadrants 0 and 1 are examined on the two cycles after
// half_ready (their PEs have seen the last block row), quadrants 2 and 3 on
// the two cycles after all_ready. Slots of the 12- and 9-entry quadrants that
// hold no candidate are forced to the maximum cost. When quadrant 3 has been
// compared, done pulses with the best quarter-pel offset and its cost.
//
// Ties: within the tree the lower slot (row-major within the quadrant) wins;
// a later quadrant replaces the optimum only when strictly cheaper. The tie
// rule and the single tree register are this implementation's choices.
//
// Timing: done rises 3 cycles after all_ready; half_ready must come at least
// 2 cycles before all_ready.
module decision_tree
  import fme_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cost_t sad [NSIDE][NSIDE],
  input  logic  half_ready,
  input  logic  all_ready,
  output logic  done,
  output qoff_t best_dy,
  output qoff_t best_dx,
  output cost_t best_cost
);

  typedef struct packed {
    cost_t      cost;
    logic [2:0] iy;
    logic [2:0] ix;
  } cand_t;

  // Quadrant sequencer: which quadrant is presented to the tree this cycle.
  logic       sel_valid;
  logic [1:0] sel_quad;
  logic       pend_q1, pend_q3;

  always_comb begin
    sel_valid = 1'b1;
    sel_quad  = 2'd0;
    if (half_ready)     sel_quad = 2'd0;
    else if (pend_q1)   sel_quad = 2'd1;
    else if (all_ready) sel_quad = 2'd2;
    else if (pend_q3)   sel_quad = 2'd3;
    else                sel_valid = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q1 <= 1'b0;
      pend_q3 <= 1'b0;
    end else begin
      pend_q1 <= half_ready;
      pend_q3 <= all_ready;
    end
  end

  // Leaves of the tree.
  cand_t leaf [NQ];
  always_comb begin
    for (int a = 0; a < ACC; a++)
      for (int b = 0; b < ACC; b++) begin
        int iy, ix;
        iy = a + (sel_quad[1] ? ACC : 0);
        ix = b + (sel_quad[0] ? ACC : 0);
        if (iy < NSIDE && ix < NSIDE)
          leaf[a*ACC+b] = '{cost: sad[iy][ix], iy: 3'(iy), ix: 3'(ix)};
        else
          leaf[a*ACC+b] = '{cost: '1, iy: 3'(RANGE), ix: 3'(RANGE)};
      end
  end

  // Binary comparator tree, 16 -> 8 -> 4 -> 2 -> 1.
  function automatic cand_t pick(input cand_t l, input cand_t r);
    return (r.cost < l.cost) ? r : l;
  endfunction

  cand_t lvl1 [8];
  cand_t lvl2 [4];
  cand_t lvl3 [2];
  cand_t root;
  always_comb begin
    for (int k = 0; k < 8; k++) lvl1[k] = pick(leaf[2*k], leaf[2*k+1]);
    for (int k = 0; k < 4; k++) lvl2[k] = pick(lvl1[2*k], lvl1[2*k+1]);
    for (int k = 0; k < 2; k++) lvl3[k] = pick(lvl2[2*k], lvl2[2*k+1]);
    root = pick(lvl3[0], lvl3[1]);
  end

  // Tree output register and sequential comparator.
  cand_t      tr;
  logic       tr_valid;
  logic [1:0] tr_quad;
  cand_t      opt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tr       <= '0;
      tr_valid <= 1'b0;
      tr_quad  <= '0;
      opt      <= '0;
      done     <= 1'b0;
    end else begin
      tr       <= root;
      tr_valid <= sel_valid;
      tr_quad  <= sel_quad;
      done     <= 1'b0;
      if (tr_valid) begin
        if (tr_quad == 2'd0 || tr.cost < opt.cost) opt <= tr;
        if (tr_quad == 2'd3) done <= 1'b1;
      end
    end
  end

  assign best_dy   = qoff_t'(int'(opt.iy) - int'(RANGE));
  assign best_dx   = qoff_t'(int'(opt.ix) - int'(RANGE));
  assign best_cost = opt.cost;

endmodule
