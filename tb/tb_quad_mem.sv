// tb_quad_mem - the quad-port memory made of four dual-port memories: every
// clock writes four words whose local identifiers differ in their low digit
// (one per write port), then every clock reads four words whose identifiers
// differ in their top digit (one per read port); all data are checked
// against a shadow array.  Write and read orders are randomised per round.
module tb_quad_mem;
  localparam int AW = 6, W = 32, J = 1 << (AW - 2);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0]          we;
  logic [3:0][AW-1:0]  waddr, raddr;
  logic [3:0][W-1:0]   wdata, rdata;
  logic                re;
  logic [W-1:0]        shadow [1<<AW];
  int checks = 0, failures = 0;

  quad_mem #(.AW(AW), .WIDTH(W)) dut (.*);

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int round = 0; round < 4; round++) begin
      int perm [J];
      for (int j = 0; j < J; j++) perm[j] = j;
      perm.shuffle();
      // write phase: LI = {j, w} on port w
      for (int j = 0; j < J; j++) begin
        @(negedge clk);
        re = 0;
        for (int w = 0; w < 4; w++) begin
          we[w]    = 1'b1;
          waddr[w] = {(AW-2)'(perm[j]), 2'(w)};
          wdata[w] = $urandom;
          shadow[waddr[w]] = wdata[w];
        end
      end
      @(negedge clk);
      we = 0;
      perm.shuffle();
      // read phase: LI = {d, j} on port d
      for (int j = 0; j <= J; j++) begin
        if (j < J) begin
          re = 1'b1;
          for (int d = 0; d < 4; d++) raddr[d] = {2'(d), (AW-2)'(perm[j])};
        end else re = 1'b0;
        @(negedge clk);
        if (j < J)
          for (int d = 0; d < 4; d++) begin
            checks++;
            if (rdata[d] !== shadow[{2'(d), (AW-2)'(perm[j])}]) begin
              failures++;
              $display("FAIL port %0d LI %0h: %h vs %h", d, {2'(d), (AW-2)'(perm[j])}, rdata[d],
                       shadow[{2'(d), (AW-2)'(perm[j])}]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
