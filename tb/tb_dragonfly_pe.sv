// tb_dragonfly_pe - radix-4 dragonfly against an integer model of the
// decimation-in-time equations: with m_d = round(W^(d arg) x_d),
//   P = x0 + m2, Q = x0 - m2, R = m1 + m3, S = m1 - m3,
//   y0 = P + R, y1 = P - R, y2 = Q - jS, y3 = Q + jS (forward; the j terms
//   swap for the inverse), each divided by 2^shift with rounding,
// with shift = 3 - input headroom (block floating point rule).  Also checks
// the headroom output and the 6-clock latency (8 with memory read and write).
module tb_dragonfly_pe;
  import hc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  cplx_t [3:0] x;
  twid_t w1, w2, w3;
  logic [1:0] shift;
  logic inv;
  cplx_t [3:0] y;
  logic [1:0] hr;
  int checks = 0, failures = 0;

  dragonfly_pe dut (.*);

  function automatic longint rnd(input longint v, input int sh);
    return (sh == 0) ? v : ((v + (longint'(1) << (sh - 1))) >>> sh);
  endfunction
  function automatic int hr_of(input longint v);
    int h;
    h = 0;
    for (int i = 1; i <= 3; i++)
      if (v >= -(longint'(1) << (DATA_W - 1 - i)) && v < (longint'(1) << (DATA_W - 1 - i))) h = i;
    return h;
  endfunction
  function automatic twid_t tw(input int e);
    twid_t t;
    t.re = TW_W'($rtoi($floor(16384.0 * $cos(6.283185307179586 * e / 256.0) + 0.5)));
    t.im = TW_W'($rtoi($floor(-16384.0 * $sin(6.283185307179586 * e / 256.0) + 0.5)));
    return t;
  endfunction

  typedef struct { longint r [4]; longint i [4]; int h; } exp_t;
  exp_t q [$];

  initial begin
    x = '0; w1 = '0; w2 = '0; w3 = '0; shift = 0; inv = 0;
    for (int n = 0; n < 3000; n++) begin
      int cls, amp, e, sh;
      longint mr [4], mi [4];
      longint pr, pi, qr, qi, rr, ri, sr, si;
      exp_t ex;
      twid_t ws [4];
      @(negedge clk);
      cls = int'($urandom_range(3));
      amp = 1 << (DATA_W - 1 - cls);
      for (int d = 0; d < 4; d++) begin
        x[d].re = DATA_W'(int'($urandom_range(2 * amp - 1)) - amp);
        x[d].im = DATA_W'(int'($urandom_range(2 * amp - 1)) - amp);
      end
      e = int'($urandom_range(63));
      w1 = tw(e); w2 = tw(2 * e); w3 = tw(3 * e);
      ws[1] = w1; ws[2] = w2; ws[3] = w3;
      inv = 1'($urandom);
      sh = 3 - cls;
      shift = 2'(sh);
      mr[0] = x[0].re; mi[0] = x[0].im;
      for (int d = 1; d < 4; d++) begin
        longint wi;
        wi = inv ? -longint'(ws[d].im) : longint'(ws[d].im);
        mr[d] = rnd(longint'(x[d].re) * longint'(ws[d].re) - longint'(x[d].im) * wi, TW_FRAC);
        mi[d] = rnd(longint'(x[d].re) * wi + longint'(x[d].im) * longint'(ws[d].re), TW_FRAC);
      end
      pr = mr[0] + mr[2]; pi = mi[0] + mi[2];
      qr = mr[0] - mr[2]; qi = mi[0] - mi[2];
      rr = mr[1] + mr[3]; ri = mi[1] + mi[3];
      sr = mr[1] - mr[3]; si = mi[1] - mi[3];
      ex.r[0] = pr + rr; ex.i[0] = pi + ri;
      ex.r[1] = pr - rr; ex.i[1] = pi - ri;
      if (!inv) begin
        ex.r[2] = qr + si; ex.i[2] = qi - sr;
        ex.r[3] = qr - si; ex.i[3] = qi + sr;
      end else begin
        ex.r[2] = qr - si; ex.i[2] = qi + sr;
        ex.r[3] = qr + si; ex.i[3] = qi - sr;
      end
      ex.h = 3;
      for (int o = 0; o < 4; o++) begin
        ex.r[o] = rnd(ex.r[o], sh);
        ex.i[o] = rnd(ex.i[o], sh);
        if (hr_of(ex.r[o]) < ex.h) ex.h = hr_of(ex.r[o]);
        if (hr_of(ex.i[o]) < ex.h) ex.h = hr_of(ex.i[o]);
      end
      q.push_back(ex);
      if (n >= 6) begin
        exp_t g;
        bit ok;
        g = q.pop_front();
        ok = (int'(hr) == g.h);
        for (int o = 0; o < 4; o++)
          if (longint'(y[o].re) != g.r[o] || longint'(y[o].im) != g.i[o]) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("FAIL n=%0d y0 (%0d,%0d) want (%0d,%0d) y2 (%0d,%0d) want (%0d,%0d) hr %0d/%0d", n,
                     y[0].re, y[0].im, g.r[0], g.i[0], y[2].re, y[2].im, g.r[2], g.i[2], hr, g.h);
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
