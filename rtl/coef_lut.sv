// coef_lut - coefficient look-up table (CLUT) of processor block Q.
//
// Holds the twiddle factors that processor block Q needs, and only those.
// For a radix-G = 2^g array with N = 2^n points and P = 2^p blocks, the
// twiddle of stage t (decimation in time) for the operation with global
// identifier id is W_N^(m*e) for input m = 1..G-1, with
//   e = bitrev_{g t}(id mod 2^(g t)) * 2^(n - g t - g).
// The table has two parts:
//   * low part, stages with g*t < p: e depends only on Q, one entry per stage
//     (per m), addressed by the stage number (lidx);
//   * high part, 2^(n-p-g) entries: e = {bitrev_p(Q), hidx} read as an
//     (n-g)-bit number, i.e. every argument whose leading bits are the
//     bit-reversed block number.  The controller produces hidx.
// For the radix-2 array (g = 1) this gives one coefficient pair per low stage
// and 2^(n-p-1) pairs for the high stages; the radix-4 array (g = 2) has three
// tables, for arg, 2arg and 3arg, each with a low and a high part.
// Entries are W_N^e = cos(2 pi e/N) - j sin(2 pi e/N), rounded to TW_FRAC
// fraction bits, computed at elaboration.
//
// Timing: registered read, w valid one clock after the address (same as the
// data memories, so twiddle and operands reach the PE together).
module coef_lut
  import hc_pkg::*;
#(
  parameter int N = 256,
  parameter int P = 4,
  parameter int G = 2,
  parameter int Q = 0
) (
  input  logic                          clk,
  input  logic                          low,
  input  logic [3:0]                    lidx,
  input  logic [$clog2(N/(P*G))-1:0]    hidx,
  output twid_t [G-2:0]                 w
);
  localparam int NB = $clog2(N);
  localparam int PB = $clog2(P);
  localparam int GB = $clog2(G);
  localparam int HW = NB - PB - GB;
  localparam int NH = 1 << HW;
  localparam int NL = (PB + GB - 1) / GB;     // stages t with g*t < p
  localparam int NLA = (NL > 0) ? NL : 1;

  typedef twid_t [G-2:0] tw_set_t;

  function automatic tw_set_t [NH-1:0] mk_high();
    tw_set_t [NH-1:0] r;
    for (int h = 0; h < NH; h++) begin
      longint e;
      e = (longint'(bitrev(Q, PB)) << HW) | longint'(h);
      for (int m = 1; m < G; m++) r[h][m-1] = twiddle(longint'(m) * e, longint'(N));
    end
    return r;
  endfunction

  function automatic tw_set_t [NLA-1:0] mk_low();
    tw_set_t [NLA-1:0] r;
    for (int t = 0; t < NLA; t++) begin
      longint e;
      e = longint'(bitrev(Q % (1 << (GB * t)), GB * t)) << (NB - GB * t - GB);
      for (int m = 1; m < G; m++) r[t][m-1] = twiddle(longint'(m) * e, longint'(N));
    end
    return r;
  endfunction

  localparam tw_set_t [NH-1:0]  HIGH = mk_high();
  localparam tw_set_t [NLA-1:0] LOW  = mk_low();

  always_ff @(posedge clk)
    if (low && NL > 0) w <= LOW[int'(lidx) % NLA];
    else               w <= HIGH[hidx];
endmodule
