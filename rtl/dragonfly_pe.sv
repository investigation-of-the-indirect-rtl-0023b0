// dragonfly_pe - radix-4 processing element (dragonfly unit) of a radix-4
// processor block.
//
// Decimation-in-time dragonfly built from four radix-2 butterflies, with the
// three twiddle products W^arg x1, W^2arg x2, W^3arg x3 (three complex
// multiplications, eight complex additions):
//   P = x0 + W^2arg x2     Q = x0 - W^2arg x2
//   R = W^arg x1 + W^3arg x3      S = W^arg x1 - W^3arg x3
//   y[0] = P + R           (frequency offset 0)
//   y[1] = P - R           (frequency offset 2)
//   y[2] = Q - jS          (frequency offset 1)
//   y[3] = Q + jS          (frequency offset 3)
// all divided by 2^shift (shift and inv travel down the pipeline with their
// operands).  Input x[d] is the operand whose local identifier
// has top digit d; output y[o] leaves through output port o, whose number is
// the bit-reversed frequency offset, so the radix-4 array leaves its results
// in the same bit-reversed order as the radix-2 array.  The -j / +j rotations
// are those of the forward transform exp(-j 2 pi k n / N); with inv set the
// twiddles are conjugated and the rotations swap.
// The result magnitude is at most (1 + 3 sqrt 2) < 8 times the largest input,
// so shift = 3 - (smallest input headroom) avoids overflow; hr (0..3) is the
// headroom of the four results.
//
// Timing: six register stages (twiddle multiply 2, first add level, second
// add level, scale, output).  With the memory read in front and the write
// behind it this is the 8-stage pipeline of the radix-4 architecture:
// operands in cycle c give y and hr in cycle c+6.
module dragonfly_pe
  import hc_pkg::*;
#(
  parameter bit CMUL3 = 1'b0
) (
  input  logic             clk,
  input  cplx_t [3:0]      x,
  input  twid_t            w1,
  input  twid_t            w2,
  input  twid_t            w3,
  input  logic [1:0]       shift,
  input  logic             inv,
  output cplx_t [3:0]      y,
  output logic  [1:0]      hr
);
  localparam int SW = DATA_W + 3;     // growth below 8x

  logic signed [DATA_W:0]  m_re [1:3], m_im [1:3];
  cplx_t                   x0_d1, x0_d2;
  logic                    inv_d1, inv_d2, inv_d3;
  logic [1:0]              sh_d1, sh_d2, sh_d3, sh_d4;
  logic signed [SW-1:0]    p_re, p_im, q_re, q_im, r_re, r_im, s_re, s_im;
  logic signed [SW-1:0]    o_re [4], o_im [4];
  cplx_t [3:0]             sc;

  cmul #(.CMUL3(CMUL3)) u_mul1 (.clk, .x(x[1]), .w(w1), .conj_w(inv), .y_re(m_re[1]), .y_im(m_im[1]));
  cmul #(.CMUL3(CMUL3)) u_mul2 (.clk, .x(x[2]), .w(w2), .conj_w(inv), .y_re(m_re[2]), .y_im(m_im[2]));
  cmul #(.CMUL3(CMUL3)) u_mul3 (.clk, .x(x[3]), .w(w3), .conj_w(inv), .y_re(m_re[3]), .y_im(m_im[3]));

  // Arithmetic right shift with rounding (half up); the result fits DATA_W
  // bits whenever the shift was chosen by the block floating point rule.
  function automatic logic signed [SW-1:0] scale(input logic signed [SW-1:0] v,
                                                 input logic [1:0] sh);
    return (sh == 0) ? v : ((v + (SW'(1) <<< (sh - 1))) >>> sh);
  endfunction

  always_ff @(posedge clk) begin
    x0_d1  <= x[0];
    x0_d2  <= x0_d1;
    inv_d1 <= inv;
    inv_d2 <= inv_d1;
    inv_d3 <= inv_d2;
    sh_d1  <= shift;
    sh_d2  <= sh_d1;
    sh_d3  <= sh_d2;
    sh_d4  <= sh_d3;
    // stage 3: first level (radix-2 butterflies BU 0X and BU 1X)
    p_re <= SW'(x0_d2.re) + SW'(m_re[2]);
    p_im <= SW'(x0_d2.im) + SW'(m_im[2]);
    q_re <= SW'(x0_d2.re) - SW'(m_re[2]);
    q_im <= SW'(x0_d2.im) - SW'(m_im[2]);
    r_re <= SW'(m_re[1]) + SW'(m_re[3]);
    r_im <= SW'(m_im[1]) + SW'(m_im[3]);
    s_re <= SW'(m_re[1]) - SW'(m_re[3]);
    s_im <= SW'(m_im[1]) - SW'(m_im[3]);
    // stage 4: second level (BU X0 and BU X1, the latter with the -j/+j turn)
    o_re[0] <= p_re + r_re;
    o_im[0] <= p_im + r_im;
    o_re[1] <= p_re - r_re;
    o_im[1] <= p_im - r_im;
    if (!inv_d3) begin
      o_re[2] <= q_re + s_im;  o_im[2] <= q_im - s_re;   // Q - jS
      o_re[3] <= q_re - s_im;  o_im[3] <= q_im + s_re;   // Q + jS
    end else begin
      o_re[2] <= q_re - s_im;  o_im[2] <= q_im + s_re;
      o_re[3] <= q_re + s_im;  o_im[3] <= q_im - s_re;
    end
    // stage 5: block floating point scaling
    for (int k = 0; k < 4; k++) begin
      sc[k].re <= DATA_W'(scale(o_re[k], sh_d4));
      sc[k].im <= DATA_W'(scale(o_im[k], sh_d4));
    end
    // stage 6: output register and headroom
    y  <= sc;
    hr <= min2(min2(cplx_headroom(sc[0], 3), cplx_headroom(sc[1], 3)),
               min2(cplx_headroom(sc[2], 3), cplx_headroom(sc[3], 3)));
  end
endmodule
