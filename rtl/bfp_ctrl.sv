// bfp_ctrl - block floating point control of one array.
//
// All data of a transform share one exponent.  While a phase (the load phase
// or a transform stage) writes its results, this unit keeps the smallest
// headroom seen (hc_pkg::headroom, capped at GB).  At the start of the next
// stage it sets that stage's right shift to GB - min_headroom, which is just
// enough that the stage cannot overflow (GB = 2 for a radix-2 butterfly,
// growth < 4; GB = 3 for a radix-4 dragonfly, growth < 8), and adds the shift
// to the block exponent.  Data that still have enough headroom are not
// shifted, so small signals keep their precision.  The true value of a word
// is word * 2^exp.
//
// Interface: clear (start of a load) resets exp and the tracked minimum (an
// observation in the same clock is kept);
// obs_valid/obs_hr deliver the smallest headroom among the words written in
// that clock; stage_start is pulsed in the first clock of each transform
// stage; shift and exp change one clock later and hold until the next stage.
// The architecture names block floating point without giving its insides;
// this scheme is this design's choice.
module bfp_ctrl
  import hc_pkg::*;
#(
  parameter int GB = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             obs_valid,
  input  logic [1:0]       obs_hr,
  input  logic             stage_start,
  output logic [1:0]       shift,
  output logic [EXP_W-1:0] exp
);
  logic [1:0] min_hr;
  logic [1:0] new_shift;

  assign new_shift = 2'(GB) - min_hr;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      min_hr <= (obs_valid && !rst) ? min2(2'(GB), obs_hr) : 2'(GB);
      shift  <= '0;
      exp    <= '0;
    end else if (stage_start) begin
      shift  <= new_shift;
      exp    <= exp + EXP_W'(new_shift);
      min_hr <= 2'(GB);
    end else if (obs_valid) begin
      min_hr <= min2(min_hr, obs_hr);
    end
  end

  assert property (@(posedge clk) disable iff (rst) obs_valid |-> obs_hr <= 2'(GB))
    else $error("bfp_ctrl: headroom %0d above cap", obs_hr);
endmodule
