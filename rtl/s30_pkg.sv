// s30_pkg: shared constants and types of the S3.0 multicore processor.
//
// Holds the instruction-set encoding (5-bit primary opcodes, 12-bit extended
// opcodes used under opcode 31), the ALU operation codes, the decoded
// instruction record and the request/response records of the shared-memory
// port. The opcode and xop numbers, the field widths of the L/D/X formats, the
// 32-bit word, the 32 registers and the interrupt vector base of 1000 are the
// instruction set's own; the ALU operation numbering and the memory port
// records are choices of this implementation.
package s30_pkg;

  localparam int unsigned XLEN      = 32;   // word width
  localparam int unsigned NREG      = 32;   // general registers R[0]..R[31]
  localparam int unsigned RIDX_W    = 5;    // register field width
  localparam int unsigned IVEC_BASE = 1000; // interrupt vector of core c is M[1000+c]
  localparam int unsigned LINK_REG  = 31;   // R[31] holds the interrupt return PC
  localparam int unsigned TRAP_REG  = 30;   // trap 1 / trap 2 print R[30]

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  // Primary opcodes (bits 31:27)
  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_LDA   = 5'd1,   // ld r1 ads
    OP_LDD   = 5'd2,   // ld r1 @d r2
    OP_STA   = 5'd3,   // st r1 ads
    OP_STD   = 5'd4,   // st r1 @d r2
    OP_MVI   = 5'd5,   // mv r1 #n
    OP_JMP   = 5'd6,
    OP_JAL   = 5'd7,
    OP_JT    = 5'd8,
    OP_JF    = 5'd9,
    OP_ADDI  = 5'd10,
    OP_SUBI  = 5'd11,
    OP_MULI  = 5'd12,
    OP_DIVI  = 5'd13,
    OP_ANDI  = 5'd14,
    OP_ORI   = 5'd15,
    OP_XORI  = 5'd16,
    OP_EQI   = 5'd17,
    OP_NEI   = 5'd18,
    OP_LTI   = 5'd19,
    OP_LEI   = 5'd20,
    OP_GTI   = 5'd21,
    OP_GEI   = 5'd22,
    OP_SHLI  = 5'd23,
    OP_SHRI  = 5'd24,
    OP_XOP   = 5'd31
  } opcode_e;

  // Extended opcodes (bits 11:0 of an X-format instruction)
  typedef enum logic [11:0] {
    X_ADD   = 12'd0,
    X_SUB   = 12'd1,
    X_MUL   = 12'd2,
    X_DIV   = 12'd3,
    X_AND   = 12'd4,
    X_OR    = 12'd5,
    X_XOR   = 12'd6,
    X_EQ    = 12'd7,
    X_NE    = 12'd8,
    X_LT    = 12'd9,
    X_LE    = 12'd10,
    X_GT    = 12'd11,
    X_GE    = 12'd12,
    X_SHL   = 12'd13,
    X_SHR   = 12'd14,
    X_MV    = 12'd15,
    X_LDX   = 12'd16,
    X_STX   = 12'd17,
    X_RET   = 12'd18,
    X_TRAP  = 12'd19,
    X_PUSH  = 12'd20,
    X_POP   = 12'd21,
    X_NOT   = 12'd22,
    X_INT   = 12'd23,
    X_RETI  = 12'd24,
    X_EI    = 12'd25,
    X_DI    = 12'd26,
    X_PUSHM = 12'd27,
    X_POPM  = 12'd28,
    X_CID   = 12'd29,
    X_WFI   = 12'd30,
    X_INTX  = 12'd31,
    X_SYNC  = 12'd32
  } xop_e;

  // ALU operations. Numbered like xop 0..14 so that both the immediate
  // opcodes (10..24) and the register xops map onto them by an offset.
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_SUB = 4'd1,
    ALU_MUL = 4'd2,
    ALU_DIV = 4'd3,
    ALU_AND = 4'd4,
    ALU_OR  = 4'd5,
    ALU_XOR = 4'd6,
    ALU_EQ  = 4'd7,
    ALU_NE  = 4'd8,
    ALU_LT  = 4'd9,
    ALU_LE  = 4'd10,
    ALU_GT  = 4'd11,
    ALU_GE  = 4'd12,
    ALU_SHL = 4'd13,
    ALU_SHR = 4'd14,
    ALU_NOT = 4'd15
  } alu_op_e;

  // Decoded instruction fields
  typedef struct packed {
    opcode_e     op;      // bits 31:27
    ridx_t       r1;      // bits 26:22 (destination, or trap code)
    ridx_t       r2;      // bits 21:17
    ridx_t       r3;      // bits 16:12
    logic [11:0] xop;     // bits 11:0
    word_t       ads;     // 22-bit ads / #n, sign extended
    word_t       disp;    // 17-bit disp / #n, sign extended
  } instr_t;

  // One shared-memory access, word addressed
  typedef struct packed {
    logic  req;
    logic  we;
    word_t addr;
    word_t wdata;
  } mem_req_t;

  // Answer to a mem_req_t: gnt in the cycle the request is accepted,
  // rvalid (with rdata for a read) one cycle later.
  typedef struct packed {
    logic  gnt;
    logic  rvalid;
    word_t rdata;
  } mem_rsp_t;

endpackage
