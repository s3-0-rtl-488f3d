// s30_core: one S3.0 processor core.
//
// Executes the whole S3.0 instruction set: three-address ALU operations with a
// register or a sign-extended immediate second operand, ld/st with absolute,
// indirect (d+R[r2]) and index (R[r2]+R[r3]) addressing, mv, jumps (jmp, jt,
// jf, jal, ret), the stack operations push/pop/pushm/popm, trap, the interrupt
// instructions (int 0, reti, ei, di, wfi, intx) and the multicore instructions
// cid and sync. All memory, instructions and data alike, is reached through one
// word-addressed port shared with the other cores (see s30_mem_arbiter).
//
// Micro-architecture (this design's own; the instruction set defines none): a
// multi-cycle state machine without a pipeline.
//   START  first cycle after reset; no memory request is made in reset
//   FETCH  take a pending interrupt if enabled, otherwise request M[PC]
//   IFWAIT wait for the instruction word
//   EXEC   decode and execute; ALU, mv, jumps, cid, ei/di, intx, trap finish
//          here; loads, stores, push/pop and interrupt entry go on to MREQ
//   MULTI  one step of pushm/popm (16 steps, one word each)
//   MREQ   request the data access; MWAIT wait for its answer
//   WFI / SYNC / HALT  waiting for an interrupt, for the barrier, for reset
// With an uncontended memory an ALU or jump instruction takes 3 cycles, a load
// or store 5, pushm/popm 3 + 16*3. Each extra cycle of memory contention adds
// one cycle.
//
// Semantics that follow the instruction set: R[0] is an ordinary register;
// jal stores the address of the next instruction; push pre-increments the
// stack pointer R[r1] and pop post-decrements it; pushm stores R[0]..R[15]
// and popm reloads R[15]..R[0]; interrupt entry and "int 0" save the return PC
// in R[31] and jump to M[1000+core_id]; reti jumps to R[31].
// Choices of this design where the instruction set is silent: the PC resets to
// RESET_PC; undefined opcodes and xops act as nop; interrupt entry clears the
// interrupt enable and reti restores the value it had before entry; interrupts
// reset to disabled; "int 0" is taken whatever the enable; an interrupt is
// taken between instructions only; wfi waits for a pending interrupt and then
// continues (taking it if enabled); the pending flag is set by the irq input
// and cleared when the interrupt is taken; for push and pushm the value stored
// is read before the stack pointer is updated; pop writes R[r2] last; trap
// reports every code on the trap port and trap 0 also halts the core.
module s30_core
  import s30_pkg::*;
#(
  parameter int unsigned CORE_ID  = 0,
  parameter word_t       RESET_PC = '0
) (
  input  logic     clk,
  input  logic     rst_n,
  // shared memory port
  output mem_req_t mreq,
  input  mem_rsp_t mrsp,
  // interrupts
  input  logic     irq,          // hardware interrupt or intx from any core
  output logic     intx_valid,   // intx executed this cycle ...
  output word_t    intx_target,  // ... towards core R[r1]
  // barrier
  output logic     sync_arrive,
  input  logic     sync_go,
  // trap port (console / simulation control)
  output logic     trap_valid,
  output ridx_t    trap_code,
  output word_t    trap_value,   // R[30]
  // status
  output logic     halted,
  output logic     exec_valid    // an instruction is in EXEC this cycle
);

  typedef enum logic [3:0] {
    S_START, S_FETCH, S_IFWAIT, S_EXEC, S_MULTI, S_MREQ, S_MWAIT, S_WFI, S_SYNC, S_HALT
  } state_e;

  typedef enum logic [2:0] {
    MA_LOAD,   // write rdata to R[ma_rd]
    MA_STORE,
    MA_VEC,    // interrupt vector: PC = rdata
    MA_MPUSH,  // one pushm step
    MA_MPOP    // one popm step
  } ma_kind_e;

  state_e   state;
  word_t    pc, ir;
  logic     ie, prev_ie, pend;
  ma_kind_e ma_kind;
  word_t    ma_addr, ma_wdata;
  logic     ma_we;
  ridx_t    ma_rd;
  logic [3:0] cnt;               // pushm/popm register index

  // Decode
  logic    take_irq, is_x;
  instr_t  d;
  logic    is_alu, alu_imm;
  alu_op_e alu_op;
  s30_decode u_dec (.ir(ir), .d(d), .is_alu(is_alu), .alu_imm(alu_imm), .alu_op(alu_op));

  // Register file
  // Port 2 reads R[30] for trap, port 3 reads R[31] for reti and the
  // pushm register R[cnt]; otherwise the ports follow the r1/r2/r3 fields.
  ridx_t rf_ra2, rf_ra3;
  word_t r1v, r2v, r3v;
  logic  rf_we;
  ridx_t rf_wa;
  word_t rf_wd;
  always_comb begin
    rf_ra2 = d.r2;
    rf_ra3 = d.r3;
    if (state == S_MULTI)                    rf_ra3 = ridx_t'(cnt);
    else if (is_x && d.xop == 12'(X_RETI))   rf_ra3 = ridx_t'(LINK_REG);
    if (is_x && d.xop == 12'(X_TRAP))        rf_ra2 = ridx_t'(TRAP_REG);
  end
  s30_regfile u_rf (
    .clk(clk), .rst_n(rst_n),
    .ra1(d.r1), .ra2(rf_ra2), .ra3(rf_ra3),
    .rd1(r1v), .rd2(r2v), .rd3(r3v),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd)
  );

  // ALU
  word_t alu_y;
  s30_alu u_alu (.op(alu_op), .a(r2v), .b(alu_imm ? d.disp : r3v), .y(alu_y));

  word_t pc_next;
  assign pc_next = pc + 32'd1;

  assign take_irq = (state == S_FETCH) && pend && ie;
  assign is_x     = (d.op == OP_XOP);

  // Register write port
  always_comb begin
    rf_we = 1'b0;
    rf_wa = d.r1;
    rf_wd = '0;
    unique case (state)
      S_FETCH: if (take_irq) begin
        rf_we = 1'b1; rf_wa = ridx_t'(LINK_REG); rf_wd = pc;
      end
      S_EXEC: begin
        if (is_alu) begin
          rf_we = 1'b1; rf_wd = alu_y;
        end else begin
          unique case (d.op)
            OP_MVI: begin rf_we = 1'b1; rf_wd = d.ads; end
            OP_JAL: begin rf_we = 1'b1; rf_wd = pc_next; end
            OP_XOP: begin
              unique case (d.xop)
                12'(X_MV):   begin rf_we = 1'b1; rf_wd = r2v; end
                12'(X_CID):  begin rf_we = 1'b1; rf_wd = word_t'(CORE_ID); end
                12'(X_PUSH): begin rf_we = 1'b1; rf_wd = r1v + 32'd1; end
                12'(X_POP):  begin rf_we = 1'b1; rf_wd = r1v - 32'd1; end
                12'(X_INT):  begin rf_we = 1'b1; rf_wa = ridx_t'(LINK_REG); rf_wd = pc_next; end
                default: ;
              endcase
            end
            default: ;
          endcase
        end
      end
      S_MULTI: begin
        rf_we = 1'b1;
        rf_wd = (ma_kind == MA_MPUSH) ? r1v + 32'd1 : r1v - 32'd1;
      end
      S_MWAIT: if (mrsp.rvalid) begin
        if (ma_kind == MA_LOAD) begin
          rf_we = 1'b1; rf_wa = ma_rd; rf_wd = mrsp.rdata;
        end else if (ma_kind == MA_MPOP) begin
          rf_we = 1'b1; rf_wa = ridx_t'(cnt); rf_wd = mrsp.rdata;
        end
      end
      default: ;
    endcase
  end

  // Memory port
  always_comb begin
    mreq = '0;
    if (state == S_FETCH && !take_irq) begin
      mreq.req  = 1'b1;
      mreq.addr = pc;
    end else if (state == S_MREQ) begin
      mreq.req   = 1'b1;
      mreq.we    = ma_we;
      mreq.addr  = ma_addr;
      mreq.wdata = ma_wdata;
    end
  end

  // Control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_START;
      pc       <= RESET_PC;
      ir       <= '0;
      ie       <= 1'b0;
      prev_ie  <= 1'b0;
      pend     <= 1'b0;
      ma_kind  <= MA_LOAD;
      ma_addr  <= '0;
      ma_wdata <= '0;
      ma_we    <= 1'b0;
      ma_rd    <= '0;
      cnt      <= '0;
    end else begin
      pend <= (pend && !take_irq) || irq;
      unique case (state)
        S_FETCH: begin
          if (take_irq) begin
            prev_ie <= ie;
            ie      <= 1'b0;
            ma_kind <= MA_VEC;
            ma_we   <= 1'b0;
            ma_addr <= word_t'(IVEC_BASE + CORE_ID);
            state   <= S_MREQ;
          end else if (mrsp.gnt) begin
            state <= S_IFWAIT;
          end
        end
        S_IFWAIT: if (mrsp.rvalid) begin
          ir    <= mrsp.rdata;
          state <= S_EXEC;
        end
        S_EXEC: begin
          pc    <= pc_next;
          state <= S_FETCH;
          ma_we <= 1'b0;
          unique case (d.op)
            OP_LDA: begin ma_kind <= MA_LOAD; ma_rd <= d.r1; ma_addr <= d.ads; state <= S_MREQ; end
            OP_LDD: begin ma_kind <= MA_LOAD; ma_rd <= d.r1; ma_addr <= d.disp + r2v; state <= S_MREQ; end
            OP_STA: begin
              ma_kind <= MA_STORE; ma_we <= 1'b1; ma_addr <= d.ads; ma_wdata <= r1v; state <= S_MREQ;
            end
            OP_STD: begin
              ma_kind <= MA_STORE; ma_we <= 1'b1; ma_addr <= d.disp + r2v; ma_wdata <= r1v; state <= S_MREQ;
            end
            OP_JMP, OP_JAL: pc <= d.ads;
            OP_JT: if (r1v != '0) pc <= d.ads;
            OP_JF: if (r1v == '0) pc <= d.ads;
            OP_XOP: begin
              unique case (d.xop)
                12'(X_LDX): begin
                  ma_kind <= MA_LOAD; ma_rd <= d.r1; ma_addr <= r2v + r3v; state <= S_MREQ;
                end
                12'(X_STX): begin
                  ma_kind <= MA_STORE; ma_we <= 1'b1; ma_addr <= r2v + r3v; ma_wdata <= r1v; state <= S_MREQ;
                end
                12'(X_RET): pc <= r1v;
                12'(X_TRAP): if (d.r1 == '0) state <= S_HALT;
                12'(X_PUSH): begin
                  ma_kind <= MA_STORE; ma_we <= 1'b1; ma_addr <= r1v + 32'd1; ma_wdata <= r2v; state <= S_MREQ;
                end
                12'(X_POP): begin
                  ma_kind <= MA_LOAD; ma_rd <= d.r2; ma_addr <= r1v; state <= S_MREQ;
                end
                12'(X_INT): begin
                  prev_ie <= ie;
                  ie      <= 1'b0;
                  ma_kind <= MA_VEC;
                  ma_addr <= word_t'(IVEC_BASE + CORE_ID);
                  state   <= S_MREQ;
                end
                12'(X_RETI): begin pc <= r3v; ie <= prev_ie; end
                12'(X_EI): ie <= 1'b1;
                12'(X_DI): ie <= 1'b0;
                12'(X_PUSHM): begin ma_kind <= MA_MPUSH; cnt <= 4'd0;  state <= S_MULTI; end
                12'(X_POPM):  begin ma_kind <= MA_MPOP;  cnt <= 4'd15; state <= S_MULTI; end
                12'(X_WFI):  state <= S_WFI;
                12'(X_SYNC): state <= S_SYNC;
                default: ;
              endcase
            end
            default: ;
          endcase
        end
        S_MULTI: begin
          if (ma_kind == MA_MPUSH) begin
            ma_we    <= 1'b1;
            ma_addr  <= r1v + 32'd1;
            ma_wdata <= r3v;
          end else begin
            ma_we    <= 1'b0;
            ma_addr  <= r1v;
          end
          state <= S_MREQ;
        end
        S_MREQ: if (mrsp.gnt) state <= S_MWAIT;
        S_MWAIT: if (mrsp.rvalid) begin
          state <= S_FETCH;
          unique case (ma_kind)
            MA_VEC:   pc <= mrsp.rdata;
            MA_MPUSH: if (cnt != 4'd15) begin cnt <= cnt + 4'd1; state <= S_MULTI; end
            MA_MPOP:  if (cnt != 4'd0)  begin cnt <= cnt - 4'd1; state <= S_MULTI; end
            default: ;
          endcase
        end
        S_START: state <= S_FETCH;
        S_WFI:  if (pend) state <= S_FETCH;
        S_SYNC: if (sync_go) state <= S_FETCH;
        S_HALT: ;
        default: state <= S_FETCH;
      endcase
    end
  end

  assign intx_valid  = (state == S_EXEC) && is_x && d.xop == 12'(X_INTX);
  assign intx_target = r1v;
  assign sync_arrive = (state == S_SYNC);
  assign trap_valid  = (state == S_EXEC) && is_x && d.xop == 12'(X_TRAP);
  assign trap_code   = d.r1;
  assign trap_value  = r2v;
  assign halted      = (state == S_HALT);

  assign exec_valid  = (state == S_EXEC);

endmodule
