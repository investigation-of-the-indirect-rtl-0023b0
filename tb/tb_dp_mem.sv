// tb_dp_mem - random reads and writes on both ports of the dual-port memory,
// checked against a shadow array (registered read, one clock latency).
module tb_dp_mem;
  localparam int AW = 6, W = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en_a, we_a, en_b, we_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [W-1:0]  wdata_a, wdata_b, rdata_a, rdata_b;
  logic [W-1:0]  shadow [1<<AW];
  logic [W-1:0]  exp_a, exp_b;
  logic          chk_a, chk_b;
  int checks = 0, failures = 0;

  dp_mem #(.AW(AW), .WIDTH(W)) dut (.*);

  initial begin
    en_a = 0; en_b = 0; we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_a = 0; wdata_b = 0;
    chk_a = 0; chk_b = 0;
    // fill through both ports
    for (int i = 0; i < (1 << AW); i += 2) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = AW'(i);     wdata_a = $urandom; shadow[i]   = wdata_a;
      en_b = 1; we_b = 1; addr_b = AW'(i + 1); wdata_b = $urandom; shadow[i+1] = wdata_b;
    end
    // random mix
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (rdata_a !== exp_a) begin failures++; $display("FAIL A %h %h", rdata_a, exp_a); end end
      if (chk_b) begin checks++; if (rdata_b !== exp_b) begin failures++; $display("FAIL B %h %h", rdata_b, exp_b); end end
      en_a = 1'($urandom); we_a = 1'($urandom); addr_a = AW'($urandom); wdata_a = $urandom;
      en_b = 1'($urandom); we_b = 1'($urandom); addr_b = AW'($urandom); wdata_b = $urandom;
      if (en_a && we_a && en_b && we_b && addr_a == addr_b) we_b = 0;
      // reads see the contents before this clock's writes
      chk_a = en_a && !we_a; exp_a = shadow[addr_a];
      chk_b = en_b && !we_b; exp_b = shadow[addr_b];
      if (en_a && we_a) shadow[addr_a] = wdata_a;
      if (en_b && we_b) shadow[addr_b] = wdata_b;
      // when a port idles its output must hold
      if (!(en_a && !we_a)) begin chk_a = 1; exp_a = rdata_a; end
      if (!(en_b && !we_b)) begin chk_b = 1; exp_b = rdata_b; end
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
