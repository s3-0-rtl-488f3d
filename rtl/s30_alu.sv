// s30_alu: arithmetic and logic unit of an S3.0 core.
//
// Computes y = a op b for every arithmetic, logic, comparison and shift
// instruction of the instruction set: add sub mul div, and or xor not,
// eq ne lt le gt ge, shl shr. It is purely combinational: the result is valid
// in the same cycle as the operands. Arithmetic is two's complement and
// comparisons are signed and return 1 for true and 0 for false, as the
// instruction set defines (false == 0, true != 0).
//
// Choices of this implementation, where the instruction set says nothing:
// mul keeps the low 32 bits of the product; div is signed and truncates
// toward zero, a division by zero gives 0 and -2^31 / -1 gives -2^31; shl is a
// logical shift, shr an arithmetic one; the shift amount is the whole operand
// b taken as unsigned, so an amount of 32 or more gives 0 (shl) or the sign
// fill (shr); not ignores b.
module s30_alu
  import s30_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic signed [W-1:0] sa, sb;
  logic [W-1:0]        quot;
  logic [W-1:0]        prod;   // low half of the product

  assign sa   = signed'(a);
  assign sb   = signed'(b);
  assign prod = a * b;

  // Signed division with the two corner cases pinned down
  always_comb begin
    if (b == '0)
      quot = '0;
    else if (a == {1'b1, {(W-1){1'b0}}} && b == '1)
      quot = a;
    else
      quot = unsigned'(sa / sb);
  end

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_MUL: y = prod;
      ALU_DIV: y = quot;
      ALU_AND: y = a & b;
      ALU_OR : y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_EQ : y = W'(a == b);
      ALU_NE : y = W'(a != b);
      ALU_LT : y = W'(sa <  sb);
      ALU_LE : y = W'(sa <= sb);
      ALU_GT : y = W'(sa >  sb);
      ALU_GE : y = W'(sa >= sb);
      ALU_SHL: y = a << b;
      ALU_SHR: y = unsigned'(sa >>> b);
      ALU_NOT: y = ~a;
      default: y = '0;
    endcase
  end

endmodule
