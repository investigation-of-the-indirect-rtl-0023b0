// tb_shuffle_net - rank-g perfect shuffle links for (P,G) = (4,2), (4,4),
// (8,2), (2,4) and (8,4): every output port o of block q carries a unique
// value, which must arrive at write port w of block r with {w,r} = {q,o},
// i.e. the group identifier rotated left by g bits.
module tb_shuffle_net;
  import hc_pkg::*;
  int checks = 0, failures = 0;

  localparam int NC = 5;
  localparam int PS [NC] = '{4, 4, 8, 2, 8};
  localparam int GS [NC] = '{2, 4, 2, 4, 4};
  logic done [NC];

  for (genvar c = 0; c < NC; c++) begin : g_c
    localparam int P = PS[c], G = GS[c];
    localparam int PB = $clog2(P), GB = $clog2(G);
    cplx_t [P-1:0][G-1:0] din, dout;
    shuffle_net #(.P(P), .G(G)) dut (.din, .dout);
    initial begin
      done[c] = 0;
      for (int rep = 0; rep < 3; rep++) begin
        int base;
        base = int'($urandom_range(1000));
        for (int q = 0; q < P; q++)
          for (int o = 0; o < G; o++) begin
            din[q][o].re = DATA_W'(base + q * G + o);
            din[q][o].im = DATA_W'(c);
          end
        #1;
        for (int r = 0; r < P; r++)
          for (int w = 0; w < G; w++) begin
            int gi, q, o;
            gi = (w << PB) | r;              // input group identifier {w, r}
            q  = gi >> GB;                   // = output identifier {q, o}
            o  = gi % G;
            checks++;
            if (int'(dout[r][w].re) != base + q * G + o || int'(dout[r][w].im) != c) begin
              failures++;
              $display("FAIL P=%0d G=%0d r=%0d w=%0d got %0d want from q=%0d o=%0d", P, G, r, w,
                       dout[r][w].re, q, o);
            end
          end
      end
      done[c] = 1;
    end
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
