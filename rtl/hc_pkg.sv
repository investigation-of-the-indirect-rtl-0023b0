// hc_pkg - types, constants and helper functions shared by the indirect
// hypercube FFT arrays.
//
// Data are complex fixed-point numbers in two's complement: DATA_W bits for
// the real and for the imaginary part (integer scaling, the block exponent of
// the array gives the common power of two).  Twiddle factors have TW_W bits
// with TW_FRAC fraction bits, so +1.0 is exactly representable.  The word
// lengths are this design's choice; the architecture only asks for fixed-point
// two's complement data with block floating point.
//
// Index conventions (global identifier of a signal, n = log2 N bits):
//   id = {LI, q}   q  = the p least significant bits = processor block number
//                  LI = the n-p most significant bits = local identifier,
//                       i.e. the address inside the processor block.
// A radix-G (G = 2^g) operation takes the G signals whose identifiers differ
// only in the g most significant bits; its outputs get the identifier rotated
// left by g bits with the output number in the g least significant bits.
package hc_pkg;

  localparam int DATA_W  = 16;
  localparam int TW_W    = 16;
  localparam int TW_FRAC = TW_W - 2;
  localparam int EXP_W   = 5;     // block exponent width

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW_W-1:0] re;
    logic signed [TW_W-1:0] im;
  } twid_t;

  // Reverse the w least significant bits of v (bits above w are dropped).
  function automatic logic [31:0] bitrev(input logic [31:0] v, input int w);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < 32; i++)
      if (i < w) r[i] = v[w-1-i];
    return r;
  endfunction

  // Headroom of one DATA_W-bit value: how many of the bits below the sign bit
  // are copies of it, capped at cap.  A value with headroom h satisfies
  // -2^(DATA_W-1-h) <= v < 2^(DATA_W-1-h).
  function automatic logic [1:0] headroom(input logic signed [DATA_W-1:0] v, input int cap);
    logic [1:0] h;
    h = '0;
    for (int i = 1; i <= 3; i++)
      if (i <= cap && v[DATA_W-1-i] == v[DATA_W-1] && int'(h) == i - 1) h = 2'(i);
    return h;
  endfunction

  function automatic logic [1:0] min2(input logic [1:0] a, input logic [1:0] b);
    return (a < b) ? a : b;
  endfunction

  // Headroom of a complex value: the smaller of its two parts.
  function automatic logic [1:0] cplx_headroom(input cplx_t v, input int cap);
    return min2(headroom(v.re, cap), headroom(v.im, cap));
  endfunction

  // Twiddle W_N^e = exp(-j 2 pi e / N), rounded to TW_FRAC fraction bits.
  // Only used at elaboration time to fill the coefficient tables.
  function automatic twid_t twiddle(input longint e, input longint n_pts);
    twid_t t;
    real ang, c, s;
    ang = 6.283185307179586 * real'(e) / real'(n_pts);
    c = $cos(ang) * real'(longint'(1) << TW_FRAC);
    s = -$sin(ang) * real'(longint'(1) << TW_FRAC);
    t.re = TW_W'($rtoi($floor(c + 0.5)));
    t.im = TW_W'($rtoi($floor(s + 0.5)));
    return t;
  endfunction

endpackage
