// hc_pb - processor block Q (generalized crossbar switch) of an indirect
// hypercube array of radix G (2 or 4).
//
// Contents: one processing element - a radix-2 butterfly (bfly_pe) for G = 2
// or a radix-4 dragonfly (dragonfly_pe) for G = 4 -, the block's coefficient
// table (coef_lut) and two data memories used ping-pong: dual-port memories
// (dp_mem) for G = 2, quad-port memories built from four dual-port ones
// (quad_mem) for G = 4.  In each stage one memory is the source of the PE's
// operands and the other receives the results that the connected blocks send
// through the perfect shuffle; the roles swap every stage.
//
// Local addressing: read port d of the source memory reads local identifier
// {d, rd_j}; write port w of the destination memory writes {wr_j, w}.  The
// controller issues rd_j/tw_* in clock c; memory data and twiddles arrive in
// c+1; the PE results (pe_out, pe_hr) appear in c+K-1 and are written by the
// receiving blocks in that same clock (wr_* from the controller).  rd_data is
// the registered read data of the source memory (operands, and the output
// path during unload).
module hc_pb
  import hc_pkg::*;
#(
  parameter int N     = 256,
  parameter int P     = 4,
  parameter int G     = 2,
  parameter int Q     = 0,
  parameter bit CMUL3 = 1'b0
) (
  input  logic                          clk,
  // read side
  input  logic                          rd_en,
  input  logic                          rd_bank,
  input  logic [$clog2(N/(P*G))-1:0]    rd_j,
  input  logic                          tw_low,
  input  logic [3:0]                    tw_lidx,
  input  logic [$clog2(N/(P*G))-1:0]    tw_hidx,
  input  logic [1:0]                    shift,
  input  logic                          inv,
  output cplx_t [G-1:0]                 rd_data,
  // PE results
  output cplx_t [G-1:0]                 pe_out,
  output logic  [1:0]                   pe_hr,
  // write side
  input  logic [G-1:0]                  wr_en,
  input  logic                          wr_bank,
  input  logic [$clog2(N/(P*G))-1:0]    wr_j,
  input  cplx_t [G-1:0]                 wr_data
);
  localparam int GB = $clog2(G);
  localparam int JW = $clog2(N / (P * G));
  localparam int LW = JW + GB;

  cplx_t [1:0][G-1:0] bank_rd;   // [bank][port]
  logic               rd_bank_q;
  twid_t [G-2:0]      tw;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic              src, dst;
    assign src = rd_en && (rd_bank == 1'(b));
    assign dst = (wr_bank == 1'(b));
    if (G == 2) begin : g_dm
      logic [1:0]          en, we;
      logic [1:0][LW-1:0]  addr;
      for (genvar x = 0; x < 2; x++) begin : g_p
        assign we[x]   = dst && wr_en[x];
        assign en[x]   = we[x] || src;
        assign addr[x] = we[x] ? {wr_j, 1'(x)} : {1'(x), rd_j};
      end
      dp_mem #(.AW(LW), .WIDTH($bits(cplx_t))) u_dm (
        .clk,
        .en_a(en[0]), .we_a(we[0]), .addr_a(addr[0]), .wdata_a(wr_data[0]), .rdata_a(bank_rd[b][0]),
        .en_b(en[1]), .we_b(we[1]), .addr_b(addr[1]), .wdata_b(wr_data[1]), .rdata_b(bank_rd[b][1])
      );
    end else begin : g_qm
      logic [3:0]           we;
      logic [3:0][LW-1:0]   waddr, raddr;
      for (genvar x = 0; x < 4; x++) begin : g_p
        assign we[x]    = dst && wr_en[x];
        assign waddr[x] = {wr_j, 2'(x)};
        assign raddr[x] = {2'(x), rd_j};
      end
      quad_mem #(.AW(LW), .WIDTH($bits(cplx_t))) u_qm (
        .clk, .we, .waddr, .wdata(wr_data), .re(src), .raddr, .rdata(bank_rd[b])
      );
    end
  end

  always_ff @(posedge clk)
    if (rd_en) rd_bank_q <= rd_bank;

  assign rd_data = bank_rd[rd_bank_q];

  coef_lut #(.N(N), .P(P), .G(G), .Q(Q)) u_clut (
    .clk, .low(tw_low), .lidx(tw_lidx), .hidx(tw_hidx), .w(tw)
  );

  if (G == 2) begin : g_bfly
    bfly_pe #(.CMUL3(CMUL3)) u_pe (
      .clk, .a(rd_data[0]), .b(rd_data[1]), .w(tw[0]), .shift, .inv, .y(pe_out), .hr(pe_hr)
    );
  end else begin : g_dfly
    dragonfly_pe #(.CMUL3(CMUL3)) u_pe (
      .clk, .x(rd_data), .w1(tw[0]), .w2(tw[1]), .w3(tw[2]), .shift, .inv, .y(pe_out), .hr(pe_hr)
    );
  end

  initial assert (G == 2 || G == 4) else $fatal(1, "hc_pb: G must be 2 or 4");
endmodule
