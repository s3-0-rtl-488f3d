// s30_asm_pkg: instruction encoders used by the S3.0 testbenches to write
// programs without an external assembler. Each function returns one 32-bit
// instruction word in L-format (op:5 r1:5 ads:22), D-format
// (op:5 r1:5 r2:5 disp:17) or X-format (op:5 r1:5 r2:5 r3:5 xop:12).
package s30_asm_pkg;
  import s30_pkg::*;

  function automatic word_t enc_l(opcode_e op, int r1, int ads);
    return {op, 5'(r1), 22'(ads)};
  endfunction

  function automatic word_t enc_d(opcode_e op, int r1, int r2, int disp);
    return {op, 5'(r1), 5'(r2), 17'(disp)};
  endfunction

  function automatic word_t enc_x(xop_e xop, int r1 = 0, int r2 = 0, int r3 = 0);
    return {OP_XOP, 5'(r1), 5'(r2), 5'(r3), 12'(xop)};
  endfunction

  // Reference model of the ALU operations (alu_op_e numbering)
  function automatic word_t ref_alu(int op, word_t a, word_t b);
    logic signed [31:0] sa, sb;
    sa = signed'(a);
    sb = signed'(b);
    case (op)
      0:  return a + b;
      1:  return a - b;
      2:  return a * b;
      3:  begin
            if (b == 0) return 0;
            if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) return a;
            return unsigned'(sa / sb);
          end
      4:  return a & b;
      5:  return a | b;
      6:  return a ^ b;
      7:  return word_t'(a == b);
      8:  return word_t'(a != b);
      9:  return word_t'(sa < sb);
      10: return word_t'(sa <= sb);
      11: return word_t'(sa > sb);
      12: return word_t'(sa >= sb);
      13: return (b >= 32) ? 0 : a << b[4:0];
      14: return (b >= 32) ? (a[31] ? 32'hFFFF_FFFF : 0) : unsigned'(sa >>> b[4:0]);
      15: return ~a;
      default: return 0;
    endcase
  endfunction
endpackage
