// tb_hc_pb - one processor block of a 256-point, 4-block array, radix 2
// (block Q = 1) and radix 4 (block Q = 2).  The source memory (bank 0) is
// filled through the write ports (port w, local identifier {j, w}); then one
// stage t is run: for every operation j the G words {d, j} are read, the PE
// combines them with the block's own twiddles and the results are compared
// with a double-precision model of the DIT butterfly/dragonfly for global
// identifiers id = {d, j, Q} (within 2 LSB).  The results are written into
// bank 1, read back, and bank 0 is checked to be untouched (ping-pong).
// Latencies: memory data one clock after the read, PE results K-1 clocks after.
module tb_hc_pb;
  import hc_pkg::*;
  localparam int N = 256, P = 4, NB = 8, PB = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks [2], failures [2];
  logic done [2];

  for (genvar gi = 0; gi < 2; gi++) begin : g_g
    localparam int G = (gi == 0) ? 2 : 4;
    localparam int Q = (gi == 0) ? 1 : 2;
    localparam int K = (gi == 0) ? 7 : 8;
    localparam int GB = $clog2(G), JW = NB - PB - GB, NOPS = 1 << JW;
    logic rd_en, rd_bank, tw_low, inv, wr_bank;
    logic [JW-1:0] rd_j, tw_hidx, wr_j;
    logic [3:0] tw_lidx;
    logic [1:0] shift, pe_hr;
    logic [G-1:0] wr_en;
    cplx_t [G-1:0] rd_data, pe_out, wr_data;
    cplx_t mem0 [NOPS * G];
    cplx_t res [NOPS * G];

    hc_pb #(.N(N), .P(P), .G(G), .Q(Q)) dut (.*);

    function automatic int rev(input int v, input int wd);
      int r;
      r = 0;
      for (int i = 0; i < wd; i++) if ((v >> i) & 1) r |= 1 << (wd - 1 - i);
      return r;
    endfunction

    task automatic chk(input bit ok, input string s);
      checks[gi]++;
      if (!ok) begin
        failures[gi]++;
        if (failures[gi] < 10) $display("FAIL G=%0d %s", G, s);
      end
    endtask

    initial begin
      checks[gi] = 0; failures[gi] = 0; done[gi] = 0;
      rd_en = 0; rd_bank = 0; tw_low = 0; inv = 0; wr_bank = 0; rd_j = 0; tw_hidx = 0; wr_j = 0;
      tw_lidx = 0; shift = 0; wr_en = 0; wr_data = '0;
      for (int t = 0; t < NB / GB; t++) begin
        int sh;
        // fill bank 0
        for (int j = 0; j < NOPS; j++) begin
          @(negedge clk);
          wr_bank = 0; wr_j = JW'(j); wr_en = '1;
          for (int w = 0; w < G; w++) begin
            wr_data[w].re = DATA_W'(int'($urandom_range(4000)) - 2000);
            wr_data[w].im = DATA_W'(int'($urandom_range(4000)) - 2000);
            mem0[j * G + w] = wr_data[w];
          end
        end
        @(negedge clk);
        wr_en = '0;
        // run stage t: read j in clock c, results at c+K-1
        shift = 2'(t % 2);
        inv   = 1'(t % 3 == 1);
        sh    = GB * t - PB;
        for (int c = 0; c < NOPS + K - 1; c++) begin
          @(negedge clk);
          rd_en = (c < NOPS); rd_bank = 0; rd_j = JW'(c);
          tw_low = (sh < 0); tw_lidx = 4'(t);
          tw_hidx = (sh < 0) ? '0 : JW'(rev(c % (1 << sh), sh) << (JW - sh));
          #1;
          if (c >= K - 1) begin
            int j, e;
            real xr [4], xi [4], yr, yi;
            j = c - (K - 1);
            e = rev(((j << PB) | Q) % (1 << (GB * t)), GB * t) << (NB - GB * t - GB);
            for (int d = 0; d < G; d++) begin
              real ang, c0, s0;
              cplx_t v;
              v = mem0[(d << JW) | j];
              ang = -6.283185307179586 * real'(d * e) / real'(N);
              if (inv) ang = -ang;
              c0 = $cos(ang); s0 = $sin(ang);
              xr[d] = real'(v.re) * c0 - real'(v.im) * s0;
              xi[d] = real'(v.re) * s0 + real'(v.im) * c0;
            end
            for (int o = 0; o < G; o++) begin
              int l;
              l = (G == 2) ? o : ((o == 1) ? 2 : (o == 2) ? 1 : o);   // frequency offset of port o
              yr = 0; yi = 0;
              for (int d = 0; d < G; d++) begin
                real ang;
                ang = -6.283185307179586 * real'(d * l) / real'(G);
                if (inv) ang = -ang;
                yr += xr[d] * $cos(ang) - xi[d] * $sin(ang);
                yi += xr[d] * $sin(ang) + xi[d] * $cos(ang);
              end
              yr = yr / real'(1 << shift); yi = yi / real'(1 << shift);
              chk(real'(pe_out[o].re) - yr <= 2.0 && yr - real'(pe_out[o].re) <= 2.0 &&
                  real'(pe_out[o].im) - yi <= 2.0 && yi - real'(pe_out[o].im) <= 2.0,
                  $sformatf("t=%0d j=%0d port %0d: (%0d,%0d) want (%f,%f)", t, j, o, pe_out[o].re, pe_out[o].im, yr, yi));
              res[j * G + o] = pe_out[o];
            end
          end
        end
        @(negedge clk);
        rd_en = 0;
        // write the results into bank 1 at {j, o}
        for (int j = 0; j < NOPS; j++) begin
          @(negedge clk);
          wr_bank = 1; wr_j = JW'(j); wr_en = '1;
          for (int o = 0; o < G; o++) wr_data[o] = res[j * G + o];
        end
        @(negedge clk);
        wr_en = '0;
        // read both banks back through the read ports: port d, LI {d, j}
        for (int b = 0; b < 2; b++)
          for (int j = 0; j <= NOPS; j++) begin
            if (j < NOPS) begin rd_en = 1; rd_bank = 1'(b); rd_j = JW'(j); end
            else rd_en = 0;
            @(negedge clk);
            if (j < NOPS)
              for (int d = 0; d < G; d++) begin
                int li;
                li = (d << JW) | j;
                chk(rd_data[d] == ((b == 0) ? mem0[li] : res[li]),
                    $sformatf("bank %0d LI %0d read back", b, li));
              end
          end
      end
      done[gi] = 1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
