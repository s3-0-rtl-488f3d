// tb_s30_decode: self-checking test of the instruction decoder. Builds random
// L-, D- and X-format words and checks every field, the sign extension of the
// 22-bit ads and 17-bit disp, and the mapping of immediate opcodes 10..24 and
// xops 0..14 and 22 (not) onto the ALU operation, against values computed
// here from the bit layout.
module tb_s30_decode;
  import s30_pkg::*;

  word_t   ir;
  instr_t  d;
  logic    is_alu, alu_imm;
  alu_op_e alu_op;
  int      checks = 0, failures = 0;

  s30_decode dut (.ir(ir), .d(d), .is_alu(is_alu), .alu_imm(alu_imm), .alu_op(alu_op));

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s ir=%h got=%h exp=%h", what, ir, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked examples
    ir = 32'h0AFF_FFFF;  // op 1 (ld r1 ads), r1 = 11, ads = -1
    #1; chk(32'(d.op), 1, "op"); chk(32'(d.r1), 11, "r1"); chk(d.ads, 32'hFFFF_FFFF, "ads -1");
    ir = {5'd10, 5'd3, 5'd4, 17'h0_0005}; // add r3 r4 #5
    #1; chk(32'(is_alu), 1, "is_alu"); chk(32'(alu_imm), 1, "imm"); chk(32'(alu_op), 0, "addi"); chk(d.disp, 5, "disp 5");
    ir = {5'd31, 5'd1, 5'd2, 5'd3, 12'd22}; // not r1 r2
    #1; chk(32'(is_alu), 1, "not alu"); chk(32'(alu_op), 15, "not op"); chk(32'(alu_imm), 0, "not imm");
    ir = {5'd31, 5'd1, 5'd2, 5'd3, 12'd16}; // ld r1 +r2 r3
    #1; chk(32'(is_alu), 0, "ldx not alu");
    for (int n = 0; n < 5000; n++) begin
      logic [31:0] w;
      logic        exp_alu, exp_imm;
      int          exp_op;
      w  = $urandom;
      if (n % 4 == 0) w[31:27] = 5'd31;
      if (n % 8 == 0) w[11:0] = 12'($urandom_range(0, 40));
      ir = w;
      #1;
      chk(32'(d.op), 32'(w[31:27]), "op");
      chk(32'(d.r1), 32'(w[26:22]), "r1");
      chk(32'(d.r2), 32'(w[21:17]), "r2");
      chk(32'(d.r3), 32'(w[16:12]), "r3");
      chk(32'(d.xop), 32'(w[11:0]), "xop");
      chk(d.ads,  w[21] ? (32'hFFC0_0000 | 32'(w[21:0])) : 32'(w[21:0]), "ads");
      chk(d.disp, w[16] ? (32'hFFFE_0000 | 32'(w[16:0])) : 32'(w[16:0]), "disp");
      exp_alu = 0; exp_imm = 0; exp_op = 0;
      if (w[31:27] >= 10 && w[31:27] <= 24) begin exp_alu = 1; exp_imm = 1; exp_op = int'(w[31:27]) - 10; end
      else if (w[31:27] == 31 && w[11:0] <= 14) begin exp_alu = 1; exp_op = int'(w[11:0]); end
      else if (w[31:27] == 31 && w[11:0] == 22) begin exp_alu = 1; exp_op = 15; end
      chk(32'(is_alu), 32'(exp_alu), "is_alu");
      chk(32'(alu_imm), 32'(exp_imm), "alu_imm");
      if (exp_alu) chk(32'(alu_op), 32'(exp_op), "alu_op");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
