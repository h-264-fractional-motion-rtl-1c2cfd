// fme_ref_pkg: behavioural reference model for the testbenches.
//
// Holds one reference window and one current block in package arrays and
// computes, straight from the H.264 luma interpolation rules (integer part
// and fractional phase of each quarter-pel coordinate, the standard's sample
// names a..s), the quarter-pel sample at any position, the SAD and Lagrangian
// cost of a candidate, and the Exp-Golomb length of a vector component. It
// shares no code with the RTL.
package fme_ref_pkg;

  localparam int OFF  = 8;      // array index of window coordinate 0
  localparam int SIDE = 48;

  int win [SIDE][SIDE];         // W(y,x) = win[y+OFF][x+OFF], y,x relative to the block
  int cur [16][16];

  function automatic int W(int y, int x);
    return win[y+OFF][x+OFF];
  endfunction

  function automatic int clip1(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int f6(int a, int b, int c, int d, int e, int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction

  // Unrounded horizontal half-pel intermediate between (y,x) and (y,x+1).
  function automatic int hb1(int y, int x);
    return f6(W(y,x-2), W(y,x-1), W(y,x), W(y,x+1), W(y,x+2), W(y,x+3));
  endfunction
  function automatic int vh1(int y, int x);
    return f6(W(y-2,x), W(y-1,x), W(y,x), W(y+1,x), W(y+2,x), W(y+3,x));
  endfunction
  function automatic int hb(int y, int x);  return clip1((hb1(y,x) + 16) >>> 5); endfunction
  function automatic int vh(int y, int x);  return clip1((vh1(y,x) + 16) >>> 5); endfunction
  function automatic int cj(int y, int x);
    return clip1((f6(hb1(y-2,x), hb1(y-1,x), hb1(y,x), hb1(y+1,x), hb1(y+2,x), hb1(y+3,x)) + 512) >>> 10);
  endfunction
  function automatic int av(int a, int b); return (a + b + 1) >>> 1; endfunction

  function automatic int fdiv(int a); return (a >= 0) ? a / 4 : -((-a + 3) / 4); endfunction

  // Quarter-pel sample at quarter coordinates (Y,X) relative to the block origin.
  function automatic int qs(int Y, int X);
    int yi, xi, fy, fx;
    yi = fdiv(Y); xi = fdiv(X);
    fy = Y - 4*yi; fx = X - 4*xi;
    case ({fx[1:0], fy[1:0]})
      4'b0000: return W(yi, xi);                                   // G
      4'b0001: return av(W(yi,xi), vh(yi,xi));                     // d
      4'b0010: return vh(yi,xi);                                   // h
      4'b0011: return av(W(yi+1,xi), vh(yi,xi));                   // n
      4'b0100: return av(W(yi,xi), hb(yi,xi));                     // a
      4'b0101: return av(hb(yi,xi), vh(yi,xi));                    // e
      4'b0110: return av(vh(yi,xi), cj(yi,xi));                    // i
      4'b0111: return av(vh(yi,xi), hb(yi+1,xi));                  // p
      4'b1000: return hb(yi,xi);                                   // b
      4'b1001: return av(hb(yi,xi), cj(yi,xi));                    // f
      4'b1010: return cj(yi,xi);                                   // j
      4'b1011: return av(cj(yi,xi), hb(yi+1,xi));                  // q
      4'b1100: return av(W(yi,xi+1), hb(yi,xi));                   // c
      4'b1101: return av(hb(yi,xi), vh(yi,xi+1));                  // g
      4'b1110: return av(cj(yi,xi), vh(yi,xi+1));                  // k
      default: return av(vh(yi,xi+1), hb(yi+1,xi));                // r
    endcase
  endfunction

  function automatic int eg_bits(int v);
    int code, n;
    code = (v > 0) ? 2*v - 1 : -2*v;
    n = 0;
    while ((code + 1) >> (n + 1) != 0) n++;
    return 2*n + 1;
  endfunction

  function automatic int sad(int h, int w, int dy, int dx);
    int s;
    s = 0;
    for (int k = 0; k < h; k++)
      for (int l = 0; l < w; l++) begin
        int d;
        d = cur[k][l] - qs(4*k + dy, 4*l + dx);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  function automatic int rate(int lambda, int mvx, int mvy, int dy, int dx);
    return lambda * (eg_bits(mvx + dx) + eg_bits(mvy + dy));
  endfunction

  // Fill the window with random pixels; 'smooth' gives a gentler picture.
  function automatic void rand_window(bit smooth);
    for (int y = 0; y < SIDE; y++)
      for (int x = 0; x < SIDE; x++)
        win[y][x] = smooth ? ((y * 7 + x * 5 + int'($urandom_range(0, 40))) & 255)
                           : int'($urandom_range(0, 255));
  endfunction

  // Current block = the reference at quarter offset (dy,dx), plus noise.
  function automatic void cur_from_ref(int h, int w, int dy, int dx, int noise);
    for (int k = 0; k < h; k++)
      for (int l = 0; l < w; l++)
        cur[k][l] = clip1(qs(4*k + dy, 4*l + dx) + int'($urandom_range(0, 2*noise)) - noise);
  endfunction

endpackage
