// hc_array - SIMD array FFT processor built as a single-stage indirect
// hypercube of class g (radix G = 2^g, G = 2 or 4) with P processor blocks.
//
// The N-point decimation-in-time FFT is computed as a transpose-type
// algorithm: every signal carries an n-bit identifier id = {LI, q}; block q
// holds the signals whose p low identifier bits equal q, at local address LI.
// In each of the log_G N stages every block combines G signals differing only
// in the top g identifier bits and sends its G results, identifier rotated
// left by g bits, through the rank-g perfect shuffle (shuffle_net) to the
// blocks that own them.  Since the shuffle repeats identically every stage,
// one physical stage of blocks does all stages, with no memory conflicts: each
// write port of each block receives exactly one word per clock.
//
// Operation (1-phase architecture: load, transform, unload in sequence):
//   load     N complex samples x[0..N-1] in natural order, one per clock while
//            in_ready is high (in_valid qualifies; inv is taken with the
//            first sample: 0 = forward exp(-j2pi kn/N), 1 = inverse without
//            the 1/N factor);
//   run      log_G N stages of N/(PG) + K - 1 clocks, busy high;
//            K = 7 for radix 2, 8 for radix 4;
//   unload   N clocks of out_valid with X[out_idx] for out_idx = 0..N-1,
//            true value = out_data * 2^out_exp (block floating point);
//            out_last marks the last one.  No back-pressure on the output.
// cur_shift / cur_stage show the block floating point shift and the stage
// number of the transform in progress (status only).
// Latency from the last input sample to the first output: the run phase plus
// 3 clocks.
module hc_array
  import hc_pkg::*;
#(
  parameter int N     = 256,
  parameter int P     = 4,
  parameter int G     = 2,
  parameter bit CMUL3 = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  cplx_t                 in_data,
  input  logic                  inv,
  output logic                  out_valid,
  output cplx_t                 out_data,
  output logic [$clog2(N)-1:0]  out_idx,
  output logic [EXP_W-1:0]      out_exp,
  output logic                  out_last,
  output logic                  busy,
  output logic [1:0]            cur_shift,
  output logic [3:0]            cur_stage
);
  localparam int K   = (G == 2) ? 7 : 8;     // pipeline length per (12)
  localparam int GRW = (G == 2) ? 2 : 3;     // growth bits per stage
  localparam int JW  = $clog2(N / (P * G));
  localparam int PB  = $clog2(P);
  localparam int GB  = $clog2(G);

  // controller
  logic              inv_l, ld_we, ld_first;
  logic [PB-1:0]     ld_pb, ul_pb;
  logic [GB-1:0]     ld_port, ul_port;
  logic              rd_en, rd_bank, tw_low, wr_all, wr_bank;
  logic [JW-1:0]     rd_j, tw_hidx, wr_j;
  logic [3:0]        tw_lidx, stage;
  logic              ul_valid, ul_last, stage_start;
  logic [$clog2(N)-1:0] ul_idx;
  logic [1:0]        shift;
  logic [EXP_W-1:0]  exp;

  hc_ctrl #(.N(N), .P(P), .G(G), .K(K)) u_ctrl (
    .clk, .rst, .in_valid, .in_ready, .inv_in(inv), .inv(inv_l),
    .ld_we, .ld_pb, .ld_port, .ld_first,
    .rd_en, .rd_bank, .rd_j, .tw_low, .tw_lidx, .tw_hidx,
    .wr_all, .wr_bank, .wr_j,
    .ul_valid, .ul_pb, .ul_port, .ul_idx, .ul_last,
    .stage_start, .stage, .busy
  );

  // processor blocks and the perfect shuffle between them
  cplx_t [P-1:0][G-1:0] pe_out, net_out, pb_rd;
  logic  [P-1:0][1:0]   pe_hr;

  shuffle_net #(.P(P), .G(G)) u_net (.din(pe_out), .dout(net_out));

  for (genvar q = 0; q < P; q++) begin : g_pb
    logic  [G-1:0]  wen;
    cplx_t [G-1:0]  wdata;
    for (genvar w = 0; w < G; w++) begin : g_w
      assign wen[w]   = wr_all || (ld_we && ld_pb == PB'(q) && ld_port == GB'(w));
      assign wdata[w] = ld_we ? in_data : net_out[q][w];
    end
    hc_pb #(.N(N), .P(P), .G(G), .Q(q), .CMUL3(CMUL3)) u_pb (
      .clk,
      .rd_en, .rd_bank, .rd_j, .tw_low, .tw_lidx, .tw_hidx, .shift, .inv(inv_l),
      .rd_data(pb_rd[q]), .pe_out(pe_out[q]), .pe_hr(pe_hr[q]),
      .wr_en(wen), .wr_bank, .wr_j, .wr_data(wdata)
    );
  end

  // block floating point: observe what is written in each phase
  logic [1:0] obs_hr;
  always_comb begin
    obs_hr = 2'(GRW);
    if (ld_we) obs_hr = cplx_headroom(in_data, GRW);
    else
      for (int q = 0; q < P; q++) obs_hr = min2(obs_hr, pe_hr[q]);
  end

  bfp_ctrl #(.GB(GRW)) u_bfp (
    .clk, .rst, .clear(ld_first), .obs_valid(ld_we || wr_all), .obs_hr,
    .stage_start, .shift, .exp
  );

  // output register
  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= ul_valid;
    out_data <= pb_rd[ul_pb][ul_port];
    out_idx  <= ul_idx;
    out_last <= ul_valid && ul_last;
    out_exp  <= exp;
  end

  assign cur_shift = shift;
  assign cur_stage = stage;
endmodule
