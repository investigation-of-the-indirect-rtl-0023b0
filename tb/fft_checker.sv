// fft_checker - stimulus and self-checking for one FFT array port set.
//
// Drives NCASE transforms into an array (hc_array or one side of hc_top) and
// compares every output with a double-precision DFT computed here:
//   X[k] = sum_n x[n] exp(-+ j 2 pi k n / N)   (sign by the inverse flag),
// accepting an error of TOL_LSB units of 2^exp per part (times sqrt(N/256)
// above 256 points) plus 2^-12 of the spectrum peak.  Also checks the output order (idx 0..N-1, out_last), the
// length of the transform phase, (log_G N)(N/(PG) + K - 1) clocks, and counts
// how often each block floating point shift was used.
module fft_checker
  import hc_pkg::*;
#(
  parameter int N       = 256,
  parameter int P       = 4,
  parameter int G       = 2,
  parameter int NCASE   = 6,
  parameter int TOL_LSB = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  output logic                  in_valid,
  input  logic                  in_ready,
  output cplx_t                 in_data,
  output logic                  inv,
  input  logic                  out_valid,
  input  cplx_t                 out_data,
  input  logic [$clog2(N)-1:0]  out_idx,
  input  logic [EXP_W-1:0]      out_exp,
  input  logic                  out_last,
  input  logic                  busy,
  input  logic [1:0]            cur_shift,
  output logic                  done,
  output int                    checks,
  output int                    failures,
  output int                    shift_seen [4],
  output int                    inv_runs,
  output int                    max_err_lsb
);
  localparam int K    = (G == 2) ? 7 : 8;
  localparam int NSTG = $clog2(N) / $clog2(G);
  localparam int LAT  = NSTG * (N / (P * G) + K - 1);
  // Rounding noise of unscaled stages grows with the square root of N, so the
  // tolerance is widened by sqrt(N/256) for transforms longer than 256 points.
  localparam real TOL_F = (N > 256) ? $sqrt(real'(N) / 256.0) : 1.0;

  real  xr [N], xi [N];
  int   busy_cycles;
  logic busy_q;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[G=%0d] FAIL %s", G, what);
    end
  endtask

  // stage shift observation: sample the shift while busy
  always @(posedge clk) begin
    busy_q <= busy;
    if (busy) busy_cycles <= busy_cycles + 1;
    if (busy && !busy_q) ;
  end

  task automatic make_input(input int kind);
    for (int n = 0; n < N; n++) begin
      int a, b;
      case (kind)
        0: begin a = (n == 0) ? 20000 : 0; b = 0; end                        // impulse
        1: begin a = int'($urandom_range(65534)) - 32767;                   // full scale noise
                 b = int'($urandom_range(65534)) - 32767; end
        2: begin a = int'($urandom_range(80)) - 40;                         // small noise
                 b = int'($urandom_range(80)) - 40; end
        3: begin a = $rtoi(12000.0 * $cos(6.283185307179586 * 5.0 * n / N)); // tone, bin 5
                 b = $rtoi(12000.0 * $sin(6.283185307179586 * 5.0 * n / N)); end
        default: begin a = int'($urandom_range(8000)) - 4000;
                 b = int'($urandom_range(8000)) - 4000; end
      endcase
      xr[n] = real'(a);
      xi[n] = real'(b);
    end
  endtask

  task automatic run_case(input int kind, input bit inverse);
    real  yr [N], yi [N];
    real  peak, tol, sc, er, ei;
    int   got, e, last_seen;
    string s;
    make_input(kind);
    // reference DFT
    peak = 0.0;
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        real ang;
        ang = 6.283185307179586 * real'((k * n) % N) / real'(N);
        if (!inverse) ang = -ang;
        sr += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        si += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      yr[k] = sr; yi[k] = si;
      if ($sqrt(sr * sr + si * si) > peak) peak = $sqrt(sr * sr + si * si);
    end
    // drive
    while (!in_ready) @(posedge clk);
    busy_cycles = 0;
    for (int n = 0; n < N; n++) begin
      in_valid   <= 1'b1;
      in_data.re <= DATA_W'($rtoi(xr[n]));
      in_data.im <= DATA_W'($rtoi(xi[n]));
      inv        <= inverse;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    // collect and compare
    got = 0; last_seen = 0;
    while (got < N) begin
      @(posedge clk);
      if (out_valid) begin
        e  = int'(out_exp);
        sc = real'(longint'(1) << e);
        tol = real'(TOL_LSB) * TOL_F * sc + peak / 4096.0;
        er = real'(out_data.re) * sc - yr[out_idx];
        ei = real'(out_data.im) * sc - yi[out_idx];
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if ($rtoi((er > ei ? er : ei) / sc) > max_err_lsb) max_err_lsb = $rtoi((er > ei ? er : ei) / sc);
        s = $sformatf("case %0d inv %0d k=%0d got (%0d,%0d)*2^%0d want (%f,%f)", kind, inverse,
                      out_idx, int'(out_data.re), int'(out_data.im), e, yr[out_idx], yi[out_idx]);
        check(er <= tol && ei <= tol, s);
        check(int'(out_idx) == got, $sformatf("output order: idx %0d at position %0d", out_idx, got));
        if (out_last) last_seen++;
        got++;
      end
    end
    check(last_seen == 1 && out_last, "out_last on the last output only");
    check(busy_cycles == LAT, $sformatf("transform took %0d clocks, expected %0d", busy_cycles, LAT));
    if (inverse) inv_runs++;
  endtask

  always @(posedge clk)
    if (busy) shift_seen[cur_shift] <= shift_seen[cur_shift] + 1;

  initial begin
    in_valid = 1'b0; in_data = '0; inv = 1'b0; done = 1'b0;
    checks = 0; failures = 0; inv_runs = 0; max_err_lsb = 0; busy_cycles = 0;
    for (int i = 0; i < 4; i++) shift_seen[i] = 0;
    @(negedge rst);
    repeat (2) @(posedge clk);
    for (int c = 0; c < NCASE; c++)
      run_case(c % 5, c == 4 || c == 5);
    repeat (3) @(posedge clk);
    $display("[G=%0d N=%0d P=%0d] %0d transforms, max error %0d LSB, shifts 0/1/2/3 seen in %0d/%0d/%0d/%0d clocks",
             G, N, P, NCASE, max_err_lsb, shift_seen[0], shift_seen[1], shift_seen[2], shift_seen[3]);
    done = 1'b1;
  end
endmodule
