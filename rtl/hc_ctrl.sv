// hc_ctrl - common (SIMD) controller and address generator of one array.
//
// Every processor block executes the same operation sequence, so one
// controller broadcasts all addresses.  It runs the three phases of the
// 1-phase architecture one after the other:
//   LOAD   - accepts N samples, one per clock, in natural order.  Sample i has
//            global identifier i: it goes to block i mod P, local identifier
//            LI = i div P, bank 0, written through memory port LI mod G.
//   RUN    - log_G N stages.  In stage t the source bank is t mod 2 and the
//            destination bank the other one.  For j = 0 .. N/(PG)-1 every
//            block reads the G words with LI = {d, j} (port d, d = 0..G-1),
//            i.e. words differing only in the top g LI bits; K-1 clocks later
//            the G results of every block are written, after the perfect
//            shuffle, at LI = {j, w} through write port w of the receiving
//            block - the read address rotated left by g bits.  A stage lasts
//            N/(PG) + K - 1 clocks, so the transform takes
//            (log_G N)(N/(PG) + K - 1) clocks.
//            Twiddle addresses: stages with g*t < p use the low CLUT part at
//            the stage number; the others use the high part at
//            bitrev_{gt-p}(j mod 2^(gt-p)) * 2^(JW-(gt-p)), JW = n-p-g, the
//            same sequence as a one-processor FFT of N/P points.
//   UNLOAD - reads the result bank in bit-reversed identifier order, so that
//            the spectrum leaves in natural frequency order k = 0..N-1.
// Interface timing: the read side (rd_*, tw_*) addresses are valid in the
// clock they are issued; the PB memories and CLUTs register them.  wr_* is the
// read side delayed by K-1 clocks.  ul_* selects, one clock after the read,
// which block and port hold output k.  stage_start marks the first clock of
// each stage.  Control structure and phase handshakes are this design's
// choices; the address rules follow the architecture.  While rst is high no
// memory is read or written and busy is low, whatever the state registers
// hold.
module hc_ctrl
  import hc_pkg::*;
#(
  parameter int N = 256,
  parameter int P = 4,
  parameter int G = 2,
  parameter int K = 7
) (
  input  logic                         clk,
  input  logic                         rst,
  // load handshake
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic                         inv_in,
  output logic                         inv,
  // load write target
  output logic                         ld_we,
  output logic [$clog2(P)-1:0]         ld_pb,
  output logic [$clog2(G)-1:0]         ld_port,
  output logic                         ld_first,
  // read side (broadcast)
  output logic                         rd_en,
  output logic                         rd_bank,
  output logic [$clog2(N/(P*G))-1:0]   rd_j,
  output logic                         tw_low,
  output logic [3:0]                   tw_lidx,
  output logic [$clog2(N/(P*G))-1:0]   tw_hidx,
  // write side (broadcast)
  output logic                         wr_all,
  output logic                         wr_bank,
  output logic [$clog2(N/(P*G))-1:0]   wr_j,
  // unload select, aligned with the memory read data
  output logic                         ul_valid,
  output logic [$clog2(P)-1:0]         ul_pb,
  output logic [$clog2(G)-1:0]         ul_port,
  output logic [$clog2(N)-1:0]         ul_idx,
  output logic                         ul_last,
  // status
  output logic                         stage_start,
  output logic [3:0]                   stage,
  output logic                         busy
);
  localparam int NB   = $clog2(N);
  localparam int PB   = $clog2(P);
  localparam int GB   = $clog2(G);
  localparam int LW   = NB - PB;          // local identifier width
  localparam int JW   = LW - GB;          // operation index width
  localparam int NOPS = 1 << JW;          // operations per block per stage
  localparam int NSTG = NB / GB;          // stages
  localparam int SLEN = NOPS + K - 1;     // clocks per stage
  localparam logic FINAL_BANK = 1'(NSTG % 2);

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_UNLOAD} state_t;
  state_t state;

  logic [NB-1:0]           cnt_io;   // load / unload counter
  logic [$clog2(SLEN)-1:0] cnt;      // clock within a stage
  logic [K-2:0]            en_dly;
  logic [K-2:0][JW-1:0]    j_dly;

  // ---------------- sequencing ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_LOAD;
      cnt_io <= '0;
      cnt    <= '0;
      stage  <= '0;
      inv    <= 1'b0;
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          if (cnt_io == '0) inv <= inv_in;
          cnt_io <= cnt_io + 1'b1;
          if (cnt_io == NB'(N - 1)) begin
            state <= S_RUN;
            cnt   <= '0;
            stage <= '0;
          end
        end
        S_RUN: begin
          if (cnt == ($clog2(SLEN))'(SLEN - 1)) begin
            cnt <= '0;
            if (stage == 4'(NSTG - 1)) begin
              state  <= S_UNLOAD;
              cnt_io <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_UNLOAD: begin
          cnt_io <= cnt_io + 1'b1;
          if (cnt_io == NB'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  assign in_ready    = (state == S_LOAD) && !rst;
  assign busy        = (state == S_RUN) && !rst;
  assign stage_start = (state == S_RUN) && (cnt == '0);

  // ---------------- load target ----------------
  assign ld_we    = (state == S_LOAD) && in_valid && !rst;
  assign ld_first = ld_we && (cnt_io == '0);
  assign ld_pb    = cnt_io[PB-1:0];
  assign ld_port  = cnt_io[PB+GB-1:PB];

  // ---------------- read side ----------------
  logic [NB-1:0] ul_id;
  assign ul_id = NB'(bitrev(32'(cnt_io), NB));

  always_comb begin
    rd_en   = 1'b0;
    rd_bank = stage[0];
    rd_j    = cnt[JW-1:0];
    if (state == S_RUN) begin
      rd_en = (int'(cnt) < NOPS) && !rst;
    end else if (state == S_UNLOAD) begin
      rd_en   = !rst;
      rd_bank = FINAL_BANK;
      rd_j    = ul_id[PB+JW-1:PB];
    end
  end

  // Twiddle address: low part by stage, high part as in a scalar FFT.
  always_comb begin
    int sh;
    sh      = GB * int'(stage) - PB;
    tw_low  = (sh < 0);
    tw_lidx = stage;
    tw_hidx = '0;
    if (sh >= 0)
      tw_hidx = JW'(bitrev(32'(rd_j), sh) << (JW - sh));
  end

  // ---------------- write side: read side delayed K-1 clocks ----------------
  always_ff @(posedge clk) begin
    if (rst) en_dly <= '0;
    else     en_dly <= {en_dly[K-3:0], rd_en && (state == S_RUN)};
    j_dly <= {j_dly[K-3:0], rd_j};
  end

  always_comb begin
    wr_all  = en_dly[K-2] && !rst;
    wr_bank = ~stage[0];
    wr_j    = j_dly[K-2];
    if (state == S_LOAD) begin
      wr_bank = 1'b0;
      wr_j    = cnt_io[NB-1:PB+GB];
    end
  end

  // ---------------- unload select ----------------
  always_ff @(posedge clk) begin
    if (rst) ul_valid <= 1'b0;
    else     ul_valid <= (state == S_UNLOAD);
    ul_pb   <= ul_id[PB-1:0];
    ul_port <= ul_id[NB-1:NB-GB];
    ul_idx  <= cnt_io;
    ul_last <= (state == S_UNLOAD) && (cnt_io == NB'(N - 1));
  end

  // ---------------- checks ----------------
  initial begin
    assert (P >= 2 && (1 << PB) == P) else $fatal(1, "hc_ctrl: P must be a power of two >= 2");
    assert ((1 << NB) == N && NB % GB == 0) else $fatal(1, "hc_ctrl: N must be a power of G");
    assert (LW >= 2 * GB) else $fatal(1, "hc_ctrl: N/P must be at least G*G");
    assert (K >= 3) else $fatal(1, "hc_ctrl: pipeline too short");
  end
  assert property (@(posedge clk) disable iff (rst) wr_all |-> state == S_RUN)
    else $error("hc_ctrl: write outside the transform phase");
endmodule
