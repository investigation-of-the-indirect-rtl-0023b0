// tb_bfly_pe - radix-2 butterfly against an integer model of
//   y0 = (a + W b) / 2^s,  y1 = (a - W b) / 2^s
// (product and shift rounded half up), forward and inverse (conj W), with the
// shift chosen as the block floating point rule does: s = 2 - headroom of the
// inputs; checks the result headroom output and the 5-clock latency (7 with
// the memory read and write around it).
module tb_bfly_pe;
  import hc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  cplx_t a, b;
  twid_t w;
  logic [1:0] shift;
  logic inv;
  cplx_t [1:0] y;
  logic [1:0] hr;
  int checks = 0, failures = 0;

  bfly_pe dut (.*);

  function automatic longint rnd(input longint v, input int sh);
    return (sh == 0) ? v : ((v + (longint'(1) << (sh - 1))) >>> sh);
  endfunction
  function automatic int hr_of(input longint v);
    int h;
    h = 0;
    for (int i = 1; i <= 2; i++)
      if (v >= -(longint'(1) << (DATA_W - 1 - i)) && v < (longint'(1) << (DATA_W - 1 - i))) h = i;
    return h;
  endfunction

  typedef struct { longint y0r, y0i, y1r, y1i; int h; } exp_t;
  exp_t q [$];

  initial begin
    a = '0; b = '0; w = '0; shift = 0; inv = 0;
    for (int n = 0; n < 3000; n++) begin
      int cls, amp;
      longint mr, mi, wi;
      exp_t e;
      real ang;
      @(negedge clk);
      cls = int'($urandom_range(2));              // input headroom class
      amp = 1 << (DATA_W - 1 - cls);
      a.re = DATA_W'(int'($urandom_range(2 * amp - 1)) - amp);
      a.im = DATA_W'(int'($urandom_range(2 * amp - 1)) - amp);
      b.re = DATA_W'(int'($urandom_range(2 * amp - 1)) - amp);
      b.im = DATA_W'(int'($urandom_range(2 * amp - 1)) - amp);
      ang  = 6.283185307179586 * real'($urandom_range(255)) / 256.0;
      w.re = TW_W'($rtoi($floor(16384.0 * $cos(ang) + 0.5)));
      w.im = TW_W'($rtoi($floor(-16384.0 * $sin(ang) + 0.5)));
      inv  = 1'($urandom);
      shift = 2'(2 - cls);
      wi = inv ? -longint'(w.im) : longint'(w.im);
      mr = rnd(longint'(b.re) * longint'(w.re) - longint'(b.im) * wi, TW_FRAC);
      mi = rnd(longint'(b.re) * wi + longint'(b.im) * longint'(w.re), TW_FRAC);
      e.y0r = rnd(longint'(a.re) + mr, 2 - cls);
      e.y0i = rnd(longint'(a.im) + mi, 2 - cls);
      e.y1r = rnd(longint'(a.re) - mr, 2 - cls);
      e.y1i = rnd(longint'(a.im) - mi, 2 - cls);
      e.h = hr_of(e.y0r);
      if (hr_of(e.y0i) < e.h) e.h = hr_of(e.y0i);
      if (hr_of(e.y1r) < e.h) e.h = hr_of(e.y1r);
      if (hr_of(e.y1i) < e.h) e.h = hr_of(e.y1i);
      q.push_back(e);
      if (n >= 5) begin
        exp_t g;
        g = q.pop_front();
        checks++;
        if (longint'(y[0].re) != g.y0r || longint'(y[0].im) != g.y0i ||
            longint'(y[1].re) != g.y1r || longint'(y[1].im) != g.y1i || int'(hr) != g.h) begin
          failures++;
          if (failures < 10)
            $display("FAIL n=%0d got (%0d,%0d) (%0d,%0d) hr %0d want (%0d,%0d) (%0d,%0d) hr %0d", n,
                     y[0].re, y[0].im, y[1].re, y[1].im, hr, g.y0r, g.y0i, g.y1r, g.y1i, g.h);
        end
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
