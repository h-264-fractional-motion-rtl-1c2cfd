// pe: processing element of the SAD matrix, one per candidate displacement.
//
// Each cycle the element takes P reference samples and P current-block
// pixels, forms the P absolute differences, adds them in an adder tree and
// accumulates the sum. A lane whose enable is low contributes zero; the
// enables travel with the current-block data and keep each candidate's sum
// restricted to the block. To fold rate-distortion optimisation into the
// search, the accumulator is not cleared but loaded with the Lagrangian
// rate cost of the candidate's motion vector (init / init_cost), so the
// final value is SAD + lambda * R(mv). The structure (|A-B| units, adder,
// accumulator with cost initialisation) is the design's; the accumulator
// width is this implementation's choice and wraps only beyond 2^ACC_W - 1.
//
// Timing: init has priority over accumulation; sad is the accumulator
// register, updated one cycle after the inputs.
module pe
  import fme_pkg::*;
#(
  parameter int unsigned P = 2
)(
  input  logic  clk,
  input  logic  init,
  input  cost_t init_cost,
  input  pix_t  ref_pix [P],
  input  pix_t  cur_pix [P],
  input  logic  en      [P],
  output cost_t sad
);

  cost_t sum;
  pix_t  ad [P];                 // |A - B| of each lane
  always_comb begin
    sum = '0;
    for (int l = 0; l < P; l++) begin
      ad[l] = (ref_pix[l] > cur_pix[l]) ? ref_pix[l] - cur_pix[l] : cur_pix[l] - ref_pix[l];
      if (en[l]) sum += {{(ACC_W-PIX_W){1'b0}}, ad[l]};
    end
  end

  always_ff @(posedge clk) begin
    if (init) sad <= init_cost;
    else      sad <= sad + sum;
  end

endmodule
