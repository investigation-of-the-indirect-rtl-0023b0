// quad_mem - quad-port memory (QM) of a radix-4 processor block, configured
// from four dual-port memories.
//
// A dragonfly reads four words whose local identifiers (LI) differ only in
// their two most significant bits (the read port number d), and the four
// results arriving from the connected processor blocks differ only in their
// two least significant LI bits (the write port number w).  Each of the four
// DMs gets a two-digit identifier (a,b):
//   * DM (a,b) port x is QM write port {a,x}; it takes a write when the LI's
//     top bit equals b;
//   * DM (a,b) port x is QM read port {b,x}; it serves a read when LI bit 1
//     equals a;
// so a word with local identifier LI lives in DM (LI[1], LI[top]) at address
// {LI[AW-2:2], LI[0]}.  Four writes, or four reads, in one clock therefore
// never meet on one DM port.  Which digit goes with which port follows the
// example rule of the architecture (most significant DM digit with the write
// port); the address packing is this design's choice.
//
// Interface: waddr[w] must have its two low bits equal to w, raddr[d] its two
// top bits equal to d (checked by assertions).  Reads return one clock after
// re; writes and reads are not used in the same clock.
module quad_mem #(
  parameter int AW    = 6,
  parameter int WIDTH = 32
) (
  input  logic                  clk,
  input  logic [3:0]            we,
  input  logic [3:0][AW-1:0]    waddr,
  input  logic [3:0][WIDTH-1:0] wdata,
  input  logic                  re,
  input  logic [3:0][AW-1:0]    raddr,
  output logic [3:0][WIDTH-1:0] rdata
);
  localparam int DAW = AW - 2;

  logic [3:0][1:0][WIDTH-1:0] dm_rdata;   // [dm = {a,b}][port]
  logic [3:0]                 ra1_q;      // LI bit 1 of each read port, delayed

  for (genvar dm = 0; dm < 4; dm++) begin : g_dm
    localparam logic A = dm[1];
    localparam logic B = dm[0];
    logic [1:0]              en, wen;
    logic [1:0][DAW-1:0]     addr;
    logic [1:0][WIDTH-1:0]   wd;
    for (genvar x = 0; x < 2; x++) begin : g_port
      localparam int WP = 2 * A + x;   // QM write port served
      localparam int RP = 2 * B + x;   // QM read port served
      logic w_hit, r_hit;
      assign w_hit   = we[WP] && (waddr[WP][AW-1] == B);
      assign r_hit   = re && (raddr[RP][1] == A);
      assign en[x]   = w_hit || r_hit;
      assign wen[x]  = w_hit;
      assign addr[x] = w_hit ? {waddr[WP][AW-2:2], waddr[WP][0]}
                             : {raddr[RP][AW-2:2], raddr[RP][0]};
      assign wd[x]   = wdata[WP];
    end
    dp_mem #(.AW(DAW), .WIDTH(WIDTH)) u_dm (
      .clk,
      .en_a(en[0]), .we_a(wen[0]), .addr_a(addr[0]), .wdata_a(wd[0]), .rdata_a(dm_rdata[dm][0]),
      .en_b(en[1]), .we_b(wen[1]), .addr_b(addr[1]), .wdata_b(wd[1]), .rdata_b(dm_rdata[dm][1])
    );
  end

  always_ff @(posedge clk)
    if (re)
      for (int d = 0; d < 4; d++) ra1_q[d] <= raddr[d][1];

  // Read port d = {b,x} comes from DM (a,b) port x, a taken from the LI.
  always_comb
    for (int d = 0; d < 4; d++)
      rdata[d] = dm_rdata[{ra1_q[d], d[1]}][d[0]];

  for (genvar k = 0; k < 4; k++) begin : g_chk
    assert property (@(posedge clk) we[k] |-> waddr[k][1:0] == 2'(k))
      else $error("quad_mem: write port %0d used with LI %0h", k, waddr[k]);
    assert property (@(posedge clk) re |-> raddr[k][AW-1:AW-2] == 2'(k))
      else $error("quad_mem: read port %0d used with LI %0h", k, raddr[k]);
  end
  assert property (@(posedge clk) !(re && (we != '0)))
    else $error("quad_mem: read and write in the same clock");
endmodule
