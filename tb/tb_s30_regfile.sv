// tb_s30_regfile: self-checking test of the 32 x 32-bit register file.
// Checks reset to zero, that R[0] is writable, that a write is visible on all
// three read ports one cycle later, and random write/read traffic against a
// shadow array kept by the testbench.
module tb_s30_regfile;
  import s30_pkg::*;

  logic  clk = 0, rst_n = 0;
  ridx_t ra1, ra2, ra3, wa;
  word_t rd1, rd2, rd3, wd;
  logic  we;
  word_t shadow [32];
  int    checks = 0, failures = 0;

  s30_regfile dut (.clk(clk), .rst_n(rst_n), .ra1(ra1), .ra2(ra2), .ra3(ra3),
                   .rd1(rd1), .rd2(rd2), .rd3(rd3), .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra1 = ridx_t'(i); #1; chk(rd1, 0, "reset value");
    end
    // R[0] is an ordinary register
    @(negedge clk); we = 1; wa = 0; wd = 32'hDEAD_BEEF;
    @(negedge clk); we = 0; ra1 = 0; ra2 = 0; ra3 = 0; #1;
    chk(rd1, 32'hDEAD_BEEF, "R0 port1"); chk(rd2, 32'hDEAD_BEEF, "R0 port2"); chk(rd3, 32'hDEAD_BEEF, "R0 port3");
    shadow[0] = 32'hDEAD_BEEF;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0); wa = ridx_t'($urandom); wd = $urandom;
      ra1 = ridx_t'($urandom); ra2 = ridx_t'($urandom); ra3 = ridx_t'($urandom);
      #1;
      chk(rd1, shadow[ra1], "rd1"); chk(rd2, shadow[ra2], "rd2"); chk(rd3, shadow[ra3], "rd3");
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
