// tb_hc_array - end-to-end test of the SIMD array in both radices:
// a radix-2 array and a radix-4 array, each N = 256 points on P = 4 blocks,
// run six transforms each (impulse, full-scale noise, small noise, tone,
// inverse transforms) and are compared with a floating-point DFT.  Also
// checks the transform time against (log_G N)(N/(PG) + K - 1) clocks and that
// the block floating point used more than one shift value.
module tb_hc_array;
  import hc_pkg::*;
  localparam int N = 256, P = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                 in_valid [2], in_ready [2], inv [2], out_valid [2], out_last [2], busy [2], done [2];
  cplx_t                in_data [2], out_data [2];
  logic [$clog2(N)-1:0] out_idx [2];
  logic [EXP_W-1:0]     out_exp [2];
  logic [1:0]           cur_shift [2];
  logic [3:0]           cur_stage [2];
  int                   checks [2], failures [2], inv_runs [2], max_err [2];
  int                   shift_seen [2][4];

  for (genvar r = 0; r < 2; r++) begin : g_r
    localparam int G = (r == 0) ? 2 : 4;
    hc_array #(.N(N), .P(P), .G(G)) dut (
      .clk, .rst, .in_valid(in_valid[r]), .in_ready(in_ready[r]), .in_data(in_data[r]), .inv(inv[r]),
      .out_valid(out_valid[r]), .out_data(out_data[r]), .out_idx(out_idx[r]), .out_exp(out_exp[r]),
      .out_last(out_last[r]), .busy(busy[r]), .cur_shift(cur_shift[r]), .cur_stage(cur_stage[r])
    );
    fft_checker #(.N(N), .P(P), .G(G)) chk (
      .clk, .rst, .in_valid(in_valid[r]), .in_ready(in_ready[r]), .in_data(in_data[r]), .inv(inv[r]),
      .out_valid(out_valid[r]), .out_data(out_data[r]), .out_idx(out_idx[r]), .out_exp(out_exp[r]),
      .out_last(out_last[r]), .busy(busy[r]), .cur_shift(cur_shift[r]),
      .done(done[r]), .checks(checks[r]), .failures(failures[r]), .shift_seen(shift_seen[r]),
      .inv_runs(inv_runs[r]), .max_err_lsb(max_err[r])
    );
  end

  int total_checks, total_fail;

  initial begin
    repeat (4) @(posedge clk);
    rst = 1'b0;
    wait (done[0] && done[1]);
    total_checks = checks[0] + checks[1];
    total_fail   = failures[0] + failures[1];
    for (int r = 0; r < 2; r++) begin
      int used;
      used = 0;
      for (int s = 0; s < 4; s++) if (shift_seen[r][s] > 0) used++;
      total_checks++;
      if (used < 2) begin total_fail++; $display("FAIL: array %0d used only one scaling shift", r); end
      total_checks++;
      if (inv_runs[r] == 0) begin total_fail++; $display("FAIL: array %0d ran no inverse transform", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fail);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
