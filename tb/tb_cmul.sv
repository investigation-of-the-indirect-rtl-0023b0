// tb_cmul - both complex multiplier forms (4-multiplier and 3-multiplier)
// against an integer model: y = round((x * w) / 2^TW_FRAC), with and without
// conjugation of w; includes the extreme data values and w = +-1, +-j.
// Also checks the two-clock latency.
module tb_cmul;
  import hc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  cplx_t x;
  twid_t w;
  logic  cj;
  logic signed [DATA_W:0] yr4, yi4, yr3, yi3;
  int checks = 0, failures = 0;

  cmul #(.CMUL3(1'b0)) u4 (.clk, .x, .w, .conj_w(cj), .y_re(yr4), .y_im(yi4));
  cmul #(.CMUL3(1'b1)) u3 (.clk, .x, .w, .conj_w(cj), .y_re(yr3), .y_im(yi3));

  function automatic longint rnd(input longint v);
    return (v + (longint'(1) << (TW_FRAC - 1))) >>> TW_FRAC;
  endfunction

  longint er [$], ei [$];

  initial begin
    x = '0; w = '0; cj = 0;
    for (int n = 0; n < 3000; n++) begin
      longint xr, xi, wr, wi;
      @(negedge clk);
      case (n % 7)
        0: begin x.re = -16'sd32768; x.im = -16'sd32768; end
        1: begin x.re = 16'sd32767;  x.im = -16'sd32768; end
        default: begin x.re = DATA_W'($urandom); x.im = DATA_W'($urandom); end
      endcase
      case (n % 5)
        0: begin w.re = 16'sd16384; w.im = 16'sd0; end
        1: begin w.re = 16'sd0; w.im = -16'sd16384; end
        default: begin
          real a;
          a = 6.283185307179586 * real'($urandom_range(9999)) / 10000.0;
          w.re = TW_W'($rtoi($floor(16384.0 * $cos(a) + 0.5)));
          w.im = TW_W'($rtoi($floor(16384.0 * $sin(a) + 0.5)));
        end
      endcase
      cj = 1'($urandom);
      xr = longint'(x.re); xi = longint'(x.im); wr = longint'(w.re);
      wi = cj ? -longint'(w.im) : longint'(w.im);
      er.push_back(rnd(xr * wr - xi * wi));
      ei.push_back(rnd(xr * wi + xi * wr));
      if (n >= 2) begin
        longint a, b;
        a = er.pop_front(); b = ei.pop_front();
        checks += 2;
        if (longint'(yr4) != a || longint'(yi4) != b) begin failures++; $display("FAIL 4-mult %0d %0d vs %0d %0d", yr4, yi4, a, b); end
        if (longint'(yr3) != a || longint'(yi3) != b) begin failures++; $display("FAIL 3-mult %0d %0d vs %0d %0d", yr3, yi3, a, b); end
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
