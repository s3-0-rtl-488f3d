// s30_decode: instruction field decoder of an S3.0 core.
//
// Every instruction is one 32-bit word in one of three formats, all sharing
// the 5-bit opcode in bits 31:27 and the r1 field in bits 26:22:
//   L-format  op:5 r1:5 ads:22
//   D-format  op:5 r1:5 r2:5 disp:17
//   X-format  op:5 r1:5 r2:5 r3:5 xop:12
// The decoder extracts all fields at once (the unused ones are simply ignored
// by the core) and sign-extends ads/#n (22 bits) and disp/#n (17 bits) to 32
// bits, as the instruction set requires. It also maps the immediate ALU
// opcodes 10..24 and the register xops 0..14 and 22 (not) onto one ALU
// operation code, and flags whether the instruction is an ALU instruction and
// whether its second operand is the D-format immediate. Combinational.
module s30_decode
  import s30_pkg::*;
(
  input  word_t   ir,
  output instr_t  d,
  output logic    is_alu,   // writes R[r1] with an ALU result
  output logic    alu_imm,  // second ALU operand is disp, not R[r3]
  output alu_op_e alu_op
);

  always_comb begin
    d.op   = opcode_e'(ir[31:27]);
    d.r1   = ir[26:22];
    d.r2   = ir[21:17];
    d.r3   = ir[16:12];
    d.xop  = ir[11:0];
    d.ads  = {{10{ir[21]}}, ir[21:0]};
    d.disp = {{15{ir[16]}}, ir[16:0]};
  end

  always_comb begin
    is_alu  = 1'b0;
    alu_imm = 1'b0;
    alu_op  = ALU_ADD;
    if (ir[31:27] >= 5'd10 && ir[31:27] <= 5'd24) begin
      is_alu  = 1'b1;
      alu_imm = 1'b1;
      alu_op  = alu_op_e'(4'(ir[31:27] - 5'd10));
    end else if (ir[31:27] == 5'd31) begin
      if (ir[11:0] <= 12'd14) begin
        is_alu = 1'b1;
        alu_op = alu_op_e'(ir[3:0]);
      end else if (ir[11:0] == 12'(X_NOT)) begin
        is_alu = 1'b1;
        alu_op = ALU_NOT;
      end
    end
  end

endmodule
