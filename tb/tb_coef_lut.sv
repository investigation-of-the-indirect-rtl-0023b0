// tb_coef_lut - coefficient tables of all four blocks of a 256-point,
// 4-block array, radix 2 and radix 4.  For every stage t and every operation
// j of block Q the table is read at the address the controller uses (low part
// by stage when g*t < p, otherwise the high part at bitrev(j) scaled) and the
// result is compared with the twiddle the decimation-in-time algorithm needs
// for that operation, W_N^(m e) with
//   e = bitrev_{gt}(id mod 2^(gt)) * 2^(n-gt-g),  id = {d, j, Q},
// computed here from the global identifier with double-precision cos/sin
// (within 1 LSB).  Also checks the one-clock read latency.
module tb_coef_lut;
  import hc_pkg::*;
  localparam int N = 256, P = 4, NB = 8, PB = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks [8], failures [8];
  logic done [8];

  for (genvar gi = 0; gi < 2; gi++) begin : g_g
    for (genvar q = 0; q < P; q++) begin : g_q
      localparam int G = (gi == 0) ? 2 : 4;
      localparam int GB = $clog2(G);
      localparam int JW = NB - PB - GB;
      localparam int IX = gi * 4 + q;
      logic low;
      logic [3:0] lidx;
      logic [JW-1:0] hidx;
      twid_t [G-2:0] w;
      coef_lut #(.N(N), .P(P), .G(G), .Q(q)) dut (.clk, .low, .lidx, .hidx, .w);

      function automatic int rev(input int v, input int wd);
        int r;
        r = 0;
        for (int i = 0; i < wd; i++) if ((v >> i) & 1) r |= 1 << (wd - 1 - i);
        return r;
      endfunction

      initial begin
        checks[IX] = 0; failures[IX] = 0; done[IX] = 0;
        low = 0; lidx = 0; hidx = 0;
        for (int t = 0; t < NB / GB; t++) begin
          for (int j = 0; j < (1 << JW); j++) begin
            int id, e, sh;
            @(negedge clk);
            sh   = GB * t - PB;
            low  = (sh < 0);
            lidx = 4'(t);
            hidx = (sh < 0) ? '0 : JW'(rev(j % (1 << sh), sh) << (JW - sh));
            id   = (j << PB) | q;                       // d = 0; e does not depend on d
            e    = rev(id % (1 << (GB * t)), GB * t) << (NB - GB * t - GB);
            @(negedge clk);
            for (int m = 1; m < G; m++) begin
              real c, s;
              c = 16384.0 * $cos(6.283185307179586 * real'(m * e) / real'(N));
              s = -16384.0 * $sin(6.283185307179586 * real'(m * e) / real'(N));
              checks[IX]++;
              if (real'(w[m-1].re) - c > 1.0 || c - real'(w[m-1].re) > 1.0 ||
                  real'(w[m-1].im) - s > 1.0 || s - real'(w[m-1].im) > 1.0) begin
                failures[IX]++;
                if (failures[IX] < 5)
                  $display("FAIL G=%0d Q=%0d t=%0d j=%0d m=%0d: (%0d,%0d) want (%f,%f)", G, q, t, j, m,
                           w[m-1].re, w[m-1].im, c, s);
              end
            end
          end
        end
        done[IX] = 1;
      end
    end
  end

  initial begin
    int c, f;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7]);
    c = 0; f = 0;
    for (int i = 0; i < 8; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
