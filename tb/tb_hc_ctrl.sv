// tb_hc_ctrl - controller of a 256-point, 4-block array for radix 2 (K = 7)
// and radix 4 (K = 8).  A cycle-by-cycle monitor checks:
//   load   - sample i goes to block i mod P, port (i div P) mod G, op j = i div PG,
//            bank 0;
//   run    - per stage t: N/(PG) reads j = 0,1,.. from bank t mod 2, writes of the
//            same j exactly K-1 clocks later into the other bank, stage length
//            N/(PG)+K-1, CLUT address (low part for g t < p, else
//            bitrev(j mod 2^(gt-p)) * 2^(JW-(gt-p))), transform length per (12);
//   unload - outputs k = 0..N-1, each selecting the block/port/op of the
//            identifier bitrev(k) in the final bank.
module tb_hc_ctrl;
  localparam int N = 256, P = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks [2], failures [2];
  logic done [2];

  for (genvar gi = 0; gi < 2; gi++) begin : g_g
    localparam int G = (gi == 0) ? 2 : 4;
    localparam int K = (gi == 0) ? 7 : 8;
    localparam int NB = 8, PB = 2, GB = $clog2(G), JW = NB - PB - GB;
    localparam int NOPS = 1 << JW, NSTG = NB / GB, SLEN = NOPS + K - 1;
    logic in_valid, in_ready, inv, ld_we, ld_first, rd_en, rd_bank, tw_low, wr_all, wr_bank;
    logic ul_valid, ul_last, stage_start, busy;
    logic [PB-1:0] ld_pb, ul_pb;
    logic [GB-1:0] ld_port, ul_port;
    logic [JW-1:0] rd_j, tw_hidx, wr_j;
    logic [3:0] tw_lidx, stage;
    logic [NB-1:0] ul_idx;

    hc_ctrl #(.N(N), .P(P), .G(G), .K(K)) dut (
      .clk, .rst, .in_valid, .in_ready, .inv_in(1'b1), .inv, .ld_we, .ld_pb, .ld_port, .ld_first,
      .rd_en, .rd_bank, .rd_j, .tw_low, .tw_lidx, .tw_hidx, .wr_all, .wr_bank, .wr_j,
      .ul_valid, .ul_pb, .ul_port, .ul_idx, .ul_last, .stage_start, .stage, .busy
    );

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
      int rd_time [$];
      int rdj [$];
      int busy_cnt, prev_rdj;
      checks[gi] = 0; failures[gi] = 0; done[gi] = 0;
      in_valid = 0;
      wait (!rst);
      for (int rep = 0; rep < 2; rep++) begin
        // ---- load (with one idle gap) ----
        for (int i = 0; i < N; i++) begin
          @(negedge clk);
          if (i == 10) begin in_valid = 0; @(negedge clk); chk(!ld_we, "write without in_valid"); end
          in_valid = 1;
          #1;
          chk(in_ready && ld_we && int'(ld_pb) == i % P && int'(ld_port) == (i / P) % G &&
              int'(wr_j) == i / (P * G) && wr_bank == 0 && ld_first == (i == 0),
              $sformatf("load %0d: pb %0d port %0d j %0d", i, ld_pb, ld_port, wr_j));
        end
        @(negedge clk);
        in_valid = 0;
        chk(inv == 1'b1, "inverse flag not taken");
        // ---- run ----
        busy_cnt = 0;
        for (int t = 0; t < NSTG; t++) begin
          for (int c = 0; c < SLEN; c++) begin
            int sh;
            chk(busy && int'(stage) == t && stage_start == (c == 0), $sformatf("stage %0d clock %0d status", t, c));
            busy_cnt++;
            chk(rd_en == (c < NOPS), $sformatf("stage %0d clock %0d rd_en %0d", t, c, rd_en));
            if (c < NOPS) begin
              chk(int'(rd_j) == c && rd_bank == 1'(t % 2), $sformatf("read j %0d bank %0d", rd_j, rd_bank));
              sh = GB * t - PB;
              if (sh < 0) chk(tw_low && int'(tw_lidx) == t, "low CLUT address");
              else chk(!tw_low && int'(tw_hidx) == (rev(c % (1 << sh), sh) << (JW - sh)),
                       $sformatf("stage %0d j %0d hidx %0d", t, c, tw_hidx));
            end
            chk(wr_all == (c >= K - 1), $sformatf("stage %0d clock %0d wr_all %0d", t, c, wr_all));
            if (c >= K - 1) chk(int'(wr_j) == c - (K - 1) && wr_bank == 1'((t + 1) % 2), "write j / bank");
            @(negedge clk);
          end
        end
        chk(!busy, "busy after the last stage");
        chk(busy_cnt == NSTG * (N / (P * G) + K - 1), "transform length per (12)");
        // ---- unload ----
        prev_rdj = -1;
        for (int k = 0; k <= N; k++) begin
          if (k > 0) begin
            int id;
            id = rev(k - 1, NB);
            chk(ul_valid && int'(ul_idx) == k - 1 && ul_last == (k == N), $sformatf("unload order %0d", ul_idx));
            chk(int'(ul_pb) == id % P && int'(ul_port) == (id >> (NB - GB)) && prev_rdj == (id >> PB) % NOPS,
                $sformatf("unload k=%0d pb %0d port %0d j %0d", k - 1, ul_pb, ul_port, prev_rdj));
          end
          if (k < N) begin
            chk(rd_en && rd_bank == 1'(NSTG % 2), "unload reads the final bank");
            prev_rdj = int'(rd_j);
          end
          @(negedge clk);
        end
        chk(!ul_valid && in_ready, "back to load");
      end
      done[gi] = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
