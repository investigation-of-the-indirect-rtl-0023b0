// dp_mem - dual-port data memory (DM) of a processor block.
//
// Two fully independent ports, A and B, each able to read or write one word
// per clock.  In the transform the memory is used in one role per stage: as
// the source, both ports read the two operands of one butterfly; as the
// destination, both ports accept one result each from the two processor
// blocks that feed this one.  Written as an array so that synthesis maps it
// onto a true dual-port block RAM.
//
// Timing: a write takes effect at the clock edge; a read returns the word at
// rdata_x one clock after en_x with we_x low (registered output, value kept
// while en_x is low).  Writing the same address from both ports in one clock
// never happens in the arrays and is not arbitrated.  Contents are not reset.
module dp_mem #(
  parameter int AW    = 6,
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             en_a,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             en_b,
  input  logic             we_b,
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] wdata_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] mem [1<<AW];

  always_ff @(posedge clk) begin
    if (en_a) begin
      if (we_a) mem[addr_a] <= wdata_a;
      else      rdata_a     <= mem[addr_a];
    end
  end

  always_ff @(posedge clk) begin
    if (en_b) begin
      if (we_b) mem[addr_b] <= wdata_b;
      else      rdata_b     <= mem[addr_b];
    end
  end

  // The arrays never let both ports write one word in the same clock.
  assert property (@(posedge clk) !(en_a && we_a && en_b && we_b && addr_a == addr_b))
    else $error("dp_mem: both ports write address %0d", addr_a);
endmodule
