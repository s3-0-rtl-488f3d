// tb_s30_alu: self-checking test of the S3.0 ALU. Every operation is checked
// on directed corner cases (zero, -1, min/max integers, division by zero,
// shifts of 0, 31, 32 and more) and on random operands against an independent
// reference model. The ALU is combinational; results are sampled 1 ns after
// the operands change.
module tb_s30_alu;
  import s30_pkg::*;
  import s30_asm_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  int      checks = 0, failures = 0;

  s30_alu dut (.op(op), .a(a), .b(b), .y(y));

  task automatic check(int o, word_t x, word_t z);
    word_t exp;
    op = alu_op_e'(o); a = x; b = z;
    #1;
    exp = ref_alu(o, x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [8] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'd31, 32'd32, 32'd7};
    // a few exact values worked out by hand
    op = ALU_ADD; a = 32'd5; b = 32'hFFFF_FFFD; #1; checks++; if (y != 32'd2) failures++;
    op = ALU_DIV; a = 32'hFFFF_FFF9; b = 32'd2; #1; checks++; if (y != 32'hFFFF_FFFD) failures++; // -7/2 = -3
    op = ALU_SHR; a = 32'h8000_0000; b = 32'd4; #1; checks++; if (y != 32'hF800_0000) failures++;
    op = ALU_LT;  a = 32'hFFFF_FFFF; b = 32'd0; #1; checks++; if (y != 32'd1) failures++;       // -1 < 0
    op = ALU_MUL; a = 32'd100000; b = 32'd100000; #1; checks++; if (y != 32'h540B_E400) failures++;
    for (int o = 0; o < 16; o++)
      foreach (corner[i]) foreach (corner[j]) check(o, corner[i], corner[j]);
    for (int n = 0; n < 2000; n++)
      check($urandom_range(0, 15), $urandom, (n % 3 == 0) ? word_t'($urandom_range(0, 40)) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
