// tb_hc_sizes - the array generated at sizes other than the 256-point default.
//
// The architecture is parametric in the transform length N, the number of
// processor blocks P and the radix G.  This bench builds four arrays side by
// side and runs each through the same checks as the default-size bench
// (fft_checker: DFT reference, output order, transform length of
// (log_G N)(N/(PG) + K - 1) clocks, block floating point use):
//   radix-2, N = 16,   P = 4,  standard complex multiply (two operations per
//                              block and stage)
//   radix-2, N = 1024, P = 8,  3-multiply complex multiply
//   radix-4, N = 64,   P = 4,  3-multiply complex multiply
//   radix-4, N = 1024, P = 16, standard complex multiply
// The sizes are this bench's choice.  The array requires N/P >= G*G.
module tb_hc_sizes;
  import hc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  localparam int NCFG = 4;
  localparam int CN [NCFG] = '{16, 1024, 64, 1024};
  localparam int CP [NCFG] = '{4, 8, 4, 16};
  localparam int CG [NCFG] = '{2, 2, 4, 4};
  localparam bit CM [NCFG] = '{1'b0, 1'b1, 1'b1, 1'b0};

  logic done [NCFG];
  int   checks [NCFG], failures [NCFG], inv_runs [NCFG], max_err [NCFG];
  int   shift_seen [NCFG][4];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N = CN[c], P = CP[c], G = CG[c];
    localparam bit CMUL3 = CM[c];
    logic                 in_valid, in_ready, inv, out_valid, out_last, busy;
    cplx_t                in_data, out_data;
    logic [$clog2(N)-1:0] out_idx;
    logic [EXP_W-1:0]     out_exp;
    logic [1:0]           cur_shift;
    logic [3:0]           cur_stage;

    hc_array #(.N(N), .P(P), .G(G), .CMUL3(CMUL3)) dut (
      .clk, .rst, .in_valid, .in_ready, .in_data, .inv, .out_valid, .out_data, .out_idx,
      .out_exp, .out_last, .busy, .cur_shift, .cur_stage
    );
    fft_checker #(.N(N), .P(P), .G(G), .NCASE(6)) chk (
      .clk, .rst, .in_valid, .in_ready, .in_data, .inv, .out_valid, .out_data, .out_idx,
      .out_exp, .out_last, .busy, .cur_shift, .done(done[c]), .checks(checks[c]),
      .failures(failures[c]), .shift_seen(shift_seen[c]), .inv_runs(inv_runs[c]),
      .max_err_lsb(max_err[c])
    );
  end

  int total_checks, total_fail;

  initial begin
    repeat (4) @(posedge clk);
    rst = 1'b0;
    for (int c = 0; c < NCFG; c++) wait (done[c]);
    total_checks = 0;
    total_fail   = 0;
    for (int c = 0; c < NCFG; c++) begin
      total_checks += checks[c] + 1;
      total_fail   += failures[c];
      if (inv_runs[c] == 0) begin
        total_fail++;
        $display("FAIL: configuration %0d ran no inverse transform", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fail);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    total_fail = 1;
    for (int c = 0; c < NCFG; c++) total_fail += failures[c];
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3], total_fail);
    $finish;
  end
endmodule
