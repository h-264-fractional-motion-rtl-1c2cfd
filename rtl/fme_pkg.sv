// fme_pkg: constants, types and arithmetic helpers shared by the quarter-pel
// motion-vector refinement coprocessor.
//
// The refinement is a full search over quarter-pel offsets -3..+3 in each
// direction around the integer best match (48 candidates plus the centre,
// 49 positions, a 7x7 PE matrix). Search range and accuracy follow the
// design; pixel, cost and vector widths are this implementation's choice.
//
// Candidate numbering: index = (dy+3)*7 + (dx+3), dy/dx in quarter pels.
// Quadrants: a candidate belongs to quadrant 2*di + dj where di = (dy > 0)
// and dj = (dx > 0). Quadrant 0 is 4x4, quadrants 1 and 2 are 4x3 / 3x4,
// quadrant 3 is 3x3.
package fme_pkg;

  localparam int unsigned PIX_W    = 8;   // luma sample width
  localparam int unsigned ACC_W    = 32;  // SAD + rate cost accumulator width
  localparam int unsigned MVD_W    = 16;  // motion-vector difference, quarter pels
  localparam int unsigned LAMBDA_W = 16;  // Lagrange multiplier width
  localparam int unsigned BITS_W   = 6;   // Exp-Golomb code length width
  localparam int unsigned RANGE    = 3;   // search range, quarter pels (3/4 pel)
  localparam int unsigned NSIDE    = 2 * RANGE + 1;   // 7
  localparam int unsigned NCAND    = NSIDE * NSIDE;   // 49
  localparam int unsigned ACC      = 4;   // accuracy factor a (quarter pel)
  localparam int unsigned NQ       = ACC * ACC;       // 16 quarter samples per pixel
  localparam int unsigned TAPS     = 6;   // H.264 half-pel filter length
  localparam int unsigned MARGIN   = 3;   // integer pixels of window beyond the block, per side

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [ACC_W-1:0]   cost_t;
  typedef logic signed [MVD_W-1:0] mvd_t;
  typedef logic [LAMBDA_W-1:0] lambda_t;
  typedef logic signed [2:0]  qoff_t;     // quarter-pel offset -3..+3

  // Result of a refinement.
  typedef struct packed {
    qoff_t dy;
    qoff_t dx;
    cost_t cost;
    mvd_t  mvd_y;
    mvd_t  mvd_x;
  } fme_result_t;

  // H.264 6-tap half-pel kernel (1,-5,20,20,-5,1) on six integer values.
  function automatic logic signed [19:0] tap6(input logic signed [19:0] e,
                                              input logic signed [19:0] f,
                                              input logic signed [19:0] g,
                                              input logic signed [19:0] h,
                                              input logic signed [19:0] i,
                                              input logic signed [19:0] j);
    return e - 5 * f + 20 * g + 20 * h - 5 * i + j;
  endfunction

  // Clip a signed intermediate to the pixel range.
  function automatic pix_t clip_pix(input logic signed [19:0] v);
    if (v < 0)        return '0;
    else if (v > 255) return pix_t'(255);
    else              return v[PIX_W-1:0];
  endfunction

  // Rounded average used by the quarter-pel samples.
  function automatic pix_t avg2(input pix_t a, input pix_t b);
    logic [PIX_W:0] s;
    s = {1'b0, a} + {1'b0, b} + 1'b1;
    return pix_t'(s >> 1);
  endfunction

  // Length in bits of the signed Exp-Golomb code se(v) of one vector component.
  function automatic logic [BITS_W-1:0] se_bits(input mvd_t v);
    logic [MVD_W:0] code;
    logic [BITS_W-1:0] n;
    if (v > 0) code = (MVD_W+1)'(2 * int'(v) - 1);
    else       code = (MVD_W+1)'(-2 * int'(v));
    code = code + 1'b1;
    n = '0;
    for (int b = 0; b <= MVD_W; b++)
      if (code[b]) n = BITS_W'(b);   // floor(log2(codeNum+1))
    return BITS_W'(2 * n + 1);
  endfunction

endpackage
