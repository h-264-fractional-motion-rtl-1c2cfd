// lagrange_cost: rate term of the Lagrangian cost of all 49 candidates.
//
// The cost of candidate (dy,dx) is lambda * (bits(mvd_x + dx) + bits(mvd_y + dy)),
// where mvd is the differentially coded integer-pel vector (in quarter pels)
// given with the block and bits() is the length of its signed Exp-Golomb
// code. Because the rate separates into an x and a y term, a single
// sequential multiplier forms the seven products for dx = -3..3 and the seven
// for dy = -3..3 (14 cycles), and each candidate's cost is the sum of one x
// and one y product. This runs while the interpolation pipeline fills, so it
// costs neither time nor much logic. The design states the cost is computed
// with one multiplier during the pipeline start-up; the Exp-Golomb rate model
// and the x/y split are this implementation's choices.
//
// Interface: start (one cycle) samples mvd_x, mvd_y and lambda; busy is high
// for 14 cycles, then done pulses and cand_cost[iy][ix] (iy = dy+3,
// ix = dx+3) holds the costs until the next start.
module lagrange_cost
  import fme_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  mvd_t    mvd_x,
  input  mvd_t    mvd_y,
  input  lambda_t lambda,
  output logic    busy,
  output logic    done,
  output cost_t   cand_cost [NSIDE][NSIDE]
);

  localparam int unsigned NSTEP = 2 * NSIDE;

  mvd_t    mx, my;
  lambda_t lam;
  logic [$clog2(NSTEP)-1:0] step;
  logic [2:0] slot;               // index into lx / ly for this step
  cost_t   lx [NSIDE];
  cost_t   ly [NSIDE];

  // Operand of the current step: x terms first, then y terms.
  mvd_t comp;
  logic [BITS_W-1:0] nbits;
  cost_t prod;
  always_comb begin
    slot = (32'(step) < NSIDE) ? 3'(step) : 3'(32'(step) - NSIDE);
    if (32'(step) < NSIDE) comp = mx + mvd_t'(int'(step) - int'(RANGE));
    else              comp = my + mvd_t'(int'(step) - int'(NSIDE) - int'(RANGE));
    nbits = se_bits(comp);
    prod  = cost_t'(lam) * cost_t'(nbits);      // the single multiplier
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      step <= '0;
      mx   <= '0;
      my   <= '0;
      lam  <= '0;
      for (int k = 0; k < NSIDE; k++) begin
        lx[k] <= '0;
        ly[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        step <= '0;
        mx   <= mvd_x;
        my   <= mvd_y;
        lam  <= lambda;
      end else if (busy) begin
        if (32'(step) < NSIDE) lx[slot] <= prod;
        else                   ly[slot] <= prod;
        if (32'(step) == NSTEP - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  always_comb
    for (int iy = 0; iy < NSIDE; iy++)
      for (int ix = 0; ix < NSIDE; ix++)
        cand_cost[iy][ix] = ly[iy] + lx[ix];

endmodule
