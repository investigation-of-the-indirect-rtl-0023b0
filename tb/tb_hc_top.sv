// tb_hc_top - end-to-end test of the whole design at its default size:
// both arrays (radix-2 and radix-4, 256 points on 4 processor blocks each)
// run at the same time, six transforms each, checked against a floating-point
// DFT (fft_checker).  Counts how often each mechanism of the architecture
// happened and fails if one never did: every block floating point shift
// (0..2 radix-2, 0..3 radix-4), the inverse transform, the low and the high
// part of the coefficient tables, the memory ping-pong (stage changes) and
// all log_G N stages.
module tb_hc_top;
  import hc_pkg::*;
  localparam int N = 256, P = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                 in_valid [2], in_ready [2], inv [2], out_valid [2], out_last [2], busy [2], done [2];
  cplx_t                in_data [2], out_data [2];
  logic [$clog2(N)-1:0] out_idx [2];
  logic [EXP_W-1:0]     out_exp [2];
  logic [1:0]           shift [2];
  logic [3:0]           stage [2];
  int                   checks [2], failures [2], inv_runs [2], max_err [2];
  int                   shift_seen [2][4];

  hc_top dut (
    .clk, .rst,
    .r2_in_valid(in_valid[0]), .r2_in_ready(in_ready[0]), .r2_in_data(in_data[0]), .r2_inv(inv[0]),
    .r2_out_valid(out_valid[0]), .r2_out_data(out_data[0]), .r2_out_idx(out_idx[0]),
    .r2_out_exp(out_exp[0]), .r2_out_last(out_last[0]), .r2_busy(busy[0]), .r2_shift(shift[0]),
    .r2_stage(stage[0]),
    .r4_in_valid(in_valid[1]), .r4_in_ready(in_ready[1]), .r4_in_data(in_data[1]), .r4_inv(inv[1]),
    .r4_out_valid(out_valid[1]), .r4_out_data(out_data[1]), .r4_out_idx(out_idx[1]),
    .r4_out_exp(out_exp[1]), .r4_out_last(out_last[1]), .r4_busy(busy[1]), .r4_shift(shift[1]),
    .r4_stage(stage[1])
  );

  for (genvar r = 0; r < 2; r++) begin : g_chk
    localparam int G = (r == 0) ? 2 : 4;
    fft_checker #(.N(N), .P(P), .G(G)) chk (
      .clk, .rst, .in_valid(in_valid[r]), .in_ready(in_ready[r]), .in_data(in_data[r]), .inv(inv[r]),
      .out_valid(out_valid[r]), .out_data(out_data[r]), .out_idx(out_idx[r]), .out_exp(out_exp[r]),
      .out_last(out_last[r]), .busy(busy[r]), .cur_shift(shift[r]),
      .done(done[r]), .checks(checks[r]), .failures(failures[r]), .shift_seen(shift_seen[r]),
      .inv_runs(inv_runs[r]), .max_err_lsb(max_err[r])
    );
  end

  // mechanism counters
  int tw_low_cnt [2], tw_high_cnt [2], stage_chg [2], max_stage [2];
  logic [3:0] stage_q [2];
  always @(posedge clk) begin
    for (int r = 0; r < 2; r++) begin
      stage_q[r] <= stage[r];
      if (!rst && busy[r] && stage[r] != stage_q[r]) stage_chg[r] <= stage_chg[r] + 1;
      if (busy[r] && int'(stage[r]) > max_stage[r]) max_stage[r] <= int'(stage[r]);
    end
    if (dut.u_radix2.rd_en && busy[0]) begin
      if (dut.u_radix2.tw_low) tw_low_cnt[0] <= tw_low_cnt[0] + 1;
      else                     tw_high_cnt[0] <= tw_high_cnt[0] + 1;
    end
    if (dut.u_radix4.rd_en && busy[1]) begin
      if (dut.u_radix4.tw_low) tw_low_cnt[1] <= tw_low_cnt[1] + 1;
      else                     tw_high_cnt[1] <= tw_high_cnt[1] + 1;
    end
  end

  int total_checks, total_fail;

  task automatic need(input bit ok, input string what);
    total_checks++;
    if (!ok) begin total_fail++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int r = 0; r < 2; r++) begin
      tw_low_cnt[r] = 0; tw_high_cnt[r] = 0; stage_chg[r] = 0; max_stage[r] = 0;
    end
    total_checks = 0; total_fail = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    wait (done[0] && done[1]);
    total_checks += checks[0] + checks[1];
    total_fail   += failures[0] + failures[1];
    for (int r = 0; r < 2; r++) begin
      int gmax;
      gmax = (r == 0) ? 2 : 3;
      $display("array %0d: shifts 0/1/2/3 in %0d/%0d/%0d/%0d clocks, inverse runs %0d, CLUT low/high reads %0d/%0d, stage changes %0d, last stage %0d",
               r, shift_seen[r][0], shift_seen[r][1], shift_seen[r][2], shift_seen[r][3], inv_runs[r],
               tw_low_cnt[r], tw_high_cnt[r], stage_chg[r], max_stage[r]);
      for (int s = 0; s <= gmax; s++)
        need(shift_seen[r][s] > 0, $sformatf("array %0d never used shift %0d", r, s));
      need(inv_runs[r] > 0, "no inverse transform");
      need(tw_low_cnt[r] > 0 && tw_high_cnt[r] > 0, "a coefficient table part was never used");
      need(stage_chg[r] > 0, "no stage change (memory ping-pong)");
      need(max_stage[r] == ((r == 0) ? 7 : 3), "not all stages ran");
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
