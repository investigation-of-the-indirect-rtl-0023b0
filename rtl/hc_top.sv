// hc_top - the two SIMD array FFT processors of the indirect hypercube
// architecture, side by side:
//   r2_*  radix-2 array, class-1 indirect hypercube: N2 = 256 points on
//         P2 = 4 processor blocks (butterfly PEs, dual-port memories,
//         7-stage pipeline);
//   r4_*  radix-4 array, class-2 indirect hypercube: N4 = 256 points on
//         P4 = 4 processor blocks (dragonfly PEs, quad-port memories built
//         from dual-port ones, 8-stage pipeline).
// The radix-2 size is the configuration built and tested in hardware by the
// architecture's authors; the radix-4 size is this design's choice.  The two
// arrays share only clock and reset.  Each has the hc_array interface: load
// N complex samples in natural order (in_valid/in_ready), a transform of
// (log_G N)(N/(PG) + K - 1) clocks, then N outputs in natural frequency order
// with a common block exponent: value = out_data * 2^out_exp.
module hc_top
  import hc_pkg::*;
#(
  parameter int N2 = 256,
  parameter int P2 = 4,
  parameter int N4 = 256,
  parameter int P4 = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  // radix-2 array
  input  logic                   r2_in_valid,
  output logic                   r2_in_ready,
  input  cplx_t                  r2_in_data,
  input  logic                   r2_inv,
  output logic                   r2_out_valid,
  output cplx_t                  r2_out_data,
  output logic [$clog2(N2)-1:0]  r2_out_idx,
  output logic [EXP_W-1:0]       r2_out_exp,
  output logic                   r2_out_last,
  output logic                   r2_busy,
  output logic [1:0]             r2_shift,
  output logic [3:0]             r2_stage,
  // radix-4 array
  input  logic                   r4_in_valid,
  output logic                   r4_in_ready,
  input  cplx_t                  r4_in_data,
  input  logic                   r4_inv,
  output logic                   r4_out_valid,
  output cplx_t                  r4_out_data,
  output logic [$clog2(N4)-1:0]  r4_out_idx,
  output logic [EXP_W-1:0]       r4_out_exp,
  output logic                   r4_out_last,
  output logic                   r4_busy,
  output logic [1:0]             r4_shift,
  output logic [3:0]             r4_stage
);
  hc_array #(.N(N2), .P(P2), .G(2)) u_radix2 (
    .clk, .rst,
    .in_valid(r2_in_valid), .in_ready(r2_in_ready), .in_data(r2_in_data), .inv(r2_inv),
    .out_valid(r2_out_valid), .out_data(r2_out_data), .out_idx(r2_out_idx), .out_exp(r2_out_exp),
    .out_last(r2_out_last), .busy(r2_busy), .cur_shift(r2_shift), .cur_stage(r2_stage)
  );

  hc_array #(.N(N4), .P(P4), .G(4)) u_radix4 (
    .clk, .rst,
    .in_valid(r4_in_valid), .in_ready(r4_in_ready), .in_data(r4_in_data), .inv(r4_inv),
    .out_valid(r4_out_valid), .out_data(r4_out_data), .out_idx(r4_out_idx), .out_exp(r4_out_exp),
    .out_last(r4_out_last), .busy(r4_busy), .cur_shift(r4_shift), .cur_stage(r4_stage)
  );
endmodule
