// tb_s30_mem: self-checking test of the shared memory. Uses a small memory
// (AW = 8) so that a shadow copy can be kept. Checks the one-cycle read
// latency, that a write does not change rdata, that rdata holds without a
// request, and random traffic against the shadow copy.
module tb_s30_mem;
  localparam int AW = 8;
  logic          clk = 0, req, we;
  logic [AW-1:0] addr;
  logic [31:0]   wdata, rdata;
  logic [31:0]   shadow [2**AW];
  logic          written [2**AW];
  int            checks = 0, failures = 0;

  s30_mem #(.AW(AW)) dut (.clk(clk), .req(req), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0;
    foreach (written[i]) written[i] = 0;
    // fill
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); req = 1; we = 1; addr = AW'(i); wdata = 32'(i) * 32'h0101_0101 + 7;
      shadow[i] = wdata; written[i] = 1;
    end
    // one-cycle read latency
    @(negedge clk); req = 1; we = 0; addr = 8'd42;
    @(negedge clk); req = 0; chk(rdata, shadow[42], "latency 1");
    // a write leaves rdata alone; idle holds it
    @(negedge clk); req = 1; we = 1; addr = 8'd3; wdata = 32'h1234_5678; shadow[3] = wdata;
    @(negedge clk); req = 0; chk(rdata, shadow[42], "write keeps rdata");
    @(negedge clk); chk(rdata, shadow[42], "idle keeps rdata");
    for (int n = 0; n < 3000; n++) begin
      logic          is_rd;
      logic [AW-1:0] a;
      @(negedge clk);
      is_rd = $urandom_range(0, 1) == 1;
      a = AW'($urandom);
      req = 1; we = !is_rd; addr = a; wdata = $urandom;
      @(negedge clk);
      req = 0;
      if (is_rd) chk(rdata, shadow[a], "random read");
      else shadow[a] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
