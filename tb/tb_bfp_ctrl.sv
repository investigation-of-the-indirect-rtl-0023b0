// tb_bfp_ctrl - block floating point control for both growth settings
// (GB = 2 radix-2, GB = 3 radix-4): random headroom observations per phase,
// then a stage start; the new shift must be GB - smallest headroom seen and
// the exponent the running sum of shifts.  clear restarts the exponent and
// keeps an observation made in the same clock.
module tb_bfp_ctrl;
  import hc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic clear, obs_valid, stage_start;
  logic [1:0] obs_hr;
  logic [1:0] shift2, shift3;
  logic [EXP_W-1:0] exp2, exp3;
  int checks = 0, failures = 0;

  bfp_ctrl #(.GB(2)) u2 (.clk, .rst, .clear, .obs_valid, .obs_hr(obs_hr > 2 ? 2'd2 : obs_hr), .stage_start, .shift(shift2), .exp(exp2));
  bfp_ctrl #(.GB(3)) u3 (.clk, .rst, .clear, .obs_valid, .obs_hr, .stage_start, .shift(shift3), .exp(exp3));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    int m2, m3, e2, e3;
    clear = 0; obs_valid = 0; stage_start = 0; obs_hr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int tr = 0; tr < 30; tr++) begin
      // new transform: clear together with the first observation
      @(negedge clk);
      clear = 1; obs_valid = 1; obs_hr = 2'($urandom_range(3));
      m3 = int'(obs_hr); m2 = (m3 > 2) ? 2 : m3; e2 = 0; e3 = 0;
      for (int st = 0; st < 6; st++) begin
        int nobs;
        nobs = int'($urandom_range(1, 12));
        for (int k = 0; k < nobs; k++) begin
          @(negedge clk);
          clear = 0; stage_start = 0;
          obs_valid = 1'($urandom);
          // mostly high headroom, sometimes low, so all shift values occur
          obs_hr = ($urandom_range(9) == 0) ? 2'($urandom_range(3)) : 2'd3;
          if (obs_valid) begin
            if (int'(obs_hr) < m3) m3 = int'(obs_hr);
            if ((obs_hr > 2 ? 2 : int'(obs_hr)) < m2) m2 = (obs_hr > 2) ? 2 : int'(obs_hr);
          end
        end
        @(negedge clk);
        clear = 0; obs_valid = 0; stage_start = 1;
        @(negedge clk);
        stage_start = 0;
        e2 += 2 - m2; e3 += 3 - m3;
        chk(int'(shift2) == 2 - m2, $sformatf("GB=2 shift %0d want %0d", shift2, 2 - m2));
        chk(int'(shift3) == 3 - m3, $sformatf("GB=3 shift %0d want %0d", shift3, 3 - m3));
        chk(int'(exp2) == e2 && int'(exp3) == e3, $sformatf("exp %0d/%0d want %0d/%0d", exp2, exp3, e2, e3));
        m2 = 2; m3 = 3;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
