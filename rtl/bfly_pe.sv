// bfly_pe - radix-2 processing element (butterfly unit) of a radix-2
// processor block.
//
// Decimation-in-time butterfly, one per clock:
//   y[0] = (a + W b) / 2^shift
//   y[1] = (a - W b) / 2^shift
// where W is the twiddle from the coefficient table (conjugated when inv is
// set, for the inverse transform).  y[0] goes to output port 0 and y[1] to
// output port 1 of the processor block, i.e. to the two processor blocks
// selected by the perfect shuffle.  The scaling shift comes from the block
// floating point unit and travels down the pipeline with its operands;
// shift = 2 - (smallest headroom of the inputs) keeps every result inside
// DATA_W bits because |a + W b| <= (1 + sqrt 2) max|x|.
// hr is the headroom of the two results (0..2, see hc_pkg::headroom), used by
// the block floating point unit to choose the next stage's shift.
//
// Timing: five register stages (complex multiply 2, add/subtract, scale,
// output with headroom).  Together with the registered memory read in front
// and the memory write behind it this is the 7-stage linear pipeline of the
// radix-2 architecture: operands presented in cycle c give y and hr in cycle
// c+5.  Rounding of products and of the scaling shift is to nearest (half up),
// this design's choice.
module bfly_pe
  import hc_pkg::*;
#(
  parameter bit CMUL3 = 1'b0
) (
  input  logic             clk,
  input  cplx_t            a,
  input  cplx_t            b,
  input  twid_t            w,
  input  logic [1:0]       shift,
  input  logic             inv,
  output cplx_t [1:0]      y,
  output logic  [1:0]      hr
);
  localparam int SW = DATA_W + 2;     // sum width: growth below 4x

  logic signed [DATA_W:0]  m_re, m_im;
  cplx_t                   a_d1, a_d2;
  logic [1:0]              sh_d1, sh_d2, sh_d3;
  logic signed [SW-1:0]    s_re [2], s_im [2];
  cplx_t [1:0]             sc;

  cmul #(.CMUL3(CMUL3)) u_mul (.clk, .x(b), .w, .conj_w(inv), .y_re(m_re), .y_im(m_im));

  // Arithmetic right shift with rounding (half up); the result fits DATA_W
  // bits whenever the shift was chosen by the block floating point rule.
  function automatic logic signed [SW-1:0] scale(input logic signed [SW-1:0] v,
                                                 input logic [1:0] sh);
    return (sh == 0) ? v : ((v + (SW'(1) <<< (sh - 1))) >>> sh);
  endfunction

  always_ff @(posedge clk) begin
    // stages 1-2: complex multiply (inside cmul), a follows alongside
    a_d1 <= a;
    a_d2 <= a_d1;
    sh_d1 <= shift;
    sh_d2 <= sh_d1;
    sh_d3 <= sh_d2;
    // stage 3: add / subtract
    s_re[0] <= SW'(a_d2.re) + SW'(m_re);
    s_im[0] <= SW'(a_d2.im) + SW'(m_im);
    s_re[1] <= SW'(a_d2.re) - SW'(m_re);
    s_im[1] <= SW'(a_d2.im) - SW'(m_im);
    // stage 4: block floating point scaling
    for (int k = 0; k < 2; k++) begin
      sc[k].re <= DATA_W'(scale(s_re[k], sh_d3));
      sc[k].im <= DATA_W'(scale(s_im[k], sh_d3));
    end
    // stage 5: output register and headroom of the results
    y  <= sc;
    hr <= min2(cplx_headroom(sc[0], 2), cplx_headroom(sc[1], 2));
  end
endmodule
