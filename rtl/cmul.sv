// cmul - pipelined complex multiplication of a data word by a twiddle factor.
//
// y = x * w (or x * conj(w) when conj_w is set, used by the inverse
// transform), rounded to nearest at the twiddle's binary point, so y has the
// data scaling and one extra integer bit (|w| <= 1 gives |y.re|,|y.im| <=
// sqrt(2) * max|x|).  Two forms can be chosen by CMUL3, as the architecture
// allows both:
//   CMUL3 = 0: standard, 4 multiplications and 2 additions;
//   CMUL3 = 1: 3 multiplications and 5 additions
//              t1 = wr(xr+xi), t2 = xi(wr+wi), t3 = xr(wi-wr),
//              re = t1-t2, im = t1+t3.
// Both forms compute the exact product before the single rounding and give
// identical results.
//
// Timing: two register stages (products, then rounded sums): x, w presented in
// cycle c give y in cycle c+2.  One product per clock.
module cmul
  import hc_pkg::*;
#(
  parameter bit CMUL3 = 1'b0
) (
  input  logic                    clk,
  input  cplx_t                   x,
  input  twid_t                   w,
  input  logic                    conj_w,
  output logic signed [DATA_W:0]  y_re,
  output logic signed [DATA_W:0]  y_im
);
  localparam int PW = DATA_W + TW_W + 3;

  logic signed [TW_W:0]   wr, wi;
  logic signed [PW-1:0]   p0_q, p1_q, p2_q;
  logic signed [PW-1:0]   re_full, im_full;

  assign wr = (TW_W+1)'(w.re);
  assign wi = conj_w ? -(TW_W+1)'(w.im) : (TW_W+1)'(w.im);

  if (CMUL3) begin : g_three
    // Gauss form: three multipliers, the pre-additions in the first stage.
    always_ff @(posedge clk) begin
      p0_q <= PW'(wr) * (PW'(x.re) + PW'(x.im));          // t1
      p1_q <= PW'(x.im) * (PW'(wr) + PW'(wi));       // t2
      p2_q <= PW'(x.re) * (PW'(wi) - PW'(wr));       // t3
    end
    assign re_full = p0_q - p1_q;
    assign im_full = p0_q + p2_q;
  end else begin : g_four
    logic signed [PW-1:0] p3_q;
    always_ff @(posedge clk) begin
      p0_q <= PW'(x.re) * PW'(wr);
      p1_q <= PW'(x.im) * PW'(wi);
      p2_q <= PW'(x.re) * PW'(wi);
      p3_q <= PW'(x.im) * PW'(wr);
    end
    assign re_full = p0_q - p1_q;
    assign im_full = p2_q + p3_q;
  end

  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (TW_FRAC - 1);

  always_ff @(posedge clk) begin
    y_re <= (DATA_W+1)'((re_full + HALF) >>> TW_FRAC);
    y_im <= (DATA_W+1)'((im_full + HALF) >>> TW_FRAC);
  end
endmodule
