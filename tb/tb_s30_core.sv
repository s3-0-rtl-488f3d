// tb_s30_core: self-checking test of one S3.0 core (core id 2) against a
// memory model kept in the testbench.
//
// A program assembled here exercises every instruction class: all register and
// immediate ALU operations, not, mv, ld/st in the three addressing modes,
// jmp/jt/jf/jal/ret, push/pop, pushm/popm, cid, trap 1 and trap 0, int 0 and
// reti, ei/di/wfi with the hardware interrupt, intx and sync. The program
// stores its results; the testbench compares them with values it computes
// itself. It also checks the cycle counts of this implementation (3 cycles for
// an ALU instruction, 5 for a load, with an uncontended memory) and, in the
// second half of the program, withholds grants at random to check that the
// core waits correctly for the memory.
module tb_s30_core;
  import s30_pkg::*;
  import s30_asm_pkg::*;

  localparam int CID = 2;
  localparam int MW  = 8192;

  logic     clk = 0, rst_n = 0;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic     irq = 0, intx_valid, sync_arrive, sync_go = 0, trap_valid, halted, exec_valid;
  word_t    intx_target, trap_value;
  ridx_t    trap_code;

  word_t mem [MW];
  word_t prog [$];
  int    checks = 0, failures = 0;
  int    cycle = 0;
  logic  stall_en = 0;
  logic  resp_v = 0;

  s30_core #(.CORE_ID(CID)) dut (
    .clk(clk), .rst_n(rst_n), .mreq(mreq), .mrsp(mrsp), .irq(irq),
    .intx_valid(intx_valid), .intx_target(intx_target),
    .sync_arrive(sync_arrive), .sync_go(sync_go),
    .trap_valid(trap_valid), .trap_code(trap_code), .trap_value(trap_value),
    .halted(halted), .exec_valid(exec_valid)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Memory model: grant (unless stalling), answer one cycle later
  logic stall_now;
  always @(negedge clk) stall_now = stall_en && ($urandom_range(0, 2) == 0);
  always_comb begin
    mrsp.gnt = mreq.req && !stall_now;
  end
  always @(posedge clk) begin
    resp_v <= mrsp.gnt;
    if (mrsp.gnt) begin
      if (mreq.we) mem[mreq.addr % MW] <= mreq.wdata;
      else         mrsp.rdata <= mem[mreq.addr % MW];
    end
  end
  assign mrsp.rvalid = resp_v;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int emit(word_t w);
    prog.push_back(w);
    return prog.size() - 1;
  endfunction

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Exec-cycle log for the timing checks
  int exec_cyc [4096];
  initial foreach (exec_cyc[i]) exec_cyc[i] = -1;
  always @(posedge clk)
    if (exec_valid && exec_cyc[dut.pc % 4096] < 0) exec_cyc[dut.pc % 4096] <= cycle;

  // Counters of the events the program should cause
  int n_trap1 = 0, n_intx = 0, n_sync = 0;
  word_t trap1_val = 0, intx_tgt = 0;
  always @(posedge clk) begin
    if (trap_valid && trap_code == 5'd1) begin n_trap1++; trap1_val = trap_value; end
    if (intx_valid) begin n_intx++; intx_tgt = intx_target; end
  end

  int p_ld, p_stall, p_wfi, p_sync, j1, j2, j3, jl, p_isr, p_sub;
  word_t a1 = 100, a2 = -7;
  int    imm [15];

  initial begin
    int dummy;
    foreach (mem[i]) mem[i] = 0;
    // ---- program ----
    dummy = emit(enc_l(OP_MVI, 1, 100));
    dummy = emit(enc_l(OP_MVI, 2, -7));
    for (int o = 0; o < 15; o++) begin
      dummy = emit(enc_x(xop_e'(o), 3, 1, 2));
      dummy = emit(enc_l(OP_STA, 3, 2000 + o));
    end
    for (int o = 0; o < 15; o++) begin
      imm[o] = (o == 13 || o == 14) ? 3 : ((o % 2 != 0) ? -3 : 5);
      dummy = emit(enc_d(opcode_e'(10 + o), 3, 1, imm[o]));
      dummy = emit(enc_l(OP_STA, 3, 2100 + o));
    end
    dummy = emit(enc_x(X_NOT, 3, 2));
    dummy = emit(enc_l(OP_STA, 3, 2200));
    // loads and stores
    dummy = emit(enc_l(OP_MVI, 4, 3000));
    p_ld  = emit(enc_l(OP_LDA, 5, 3000));
    dummy = emit(enc_l(OP_STA, 5, 2201));
    dummy = emit(enc_d(OP_LDD, 6, 4, 5));
    dummy = emit(enc_l(OP_STA, 6, 2202));
    dummy = emit(enc_l(OP_MVI, 7, 10));
    dummy = emit(enc_x(X_LDX, 8, 4, 7));
    dummy = emit(enc_l(OP_STA, 8, 2203));
    dummy = emit(enc_d(OP_STD, 1, 4, 7));       // M[3007] = 100
    dummy = emit(enc_x(X_STX, 2, 4, 7));        // M[3010] = -7
    dummy = emit(enc_x(X_MV, 9, 2));
    dummy = emit(enc_l(OP_STA, 9, 2204));
    // from here on the memory withholds grants at random
    p_stall = emit(enc_l(OP_MVI, 10, 0));
    j1    = emit(0);                              // jmp L1
    dummy = emit(enc_l(OP_MVI, 10, 1));
    prog[j1] = enc_l(OP_JMP, 0, prog.size());
    dummy = emit(enc_l(OP_STA, 10, 2205));
    dummy = emit(enc_l(OP_MVI, 11, 1));
    j2    = emit(0);                              // jt r11 L2
    dummy = emit(enc_l(OP_MVI, 10, 2));
    prog[j2] = enc_l(OP_JT, 11, prog.size());
    dummy = emit(enc_l(OP_STA, 10, 2206));
    j3    = emit(0);                              // jf r11 L3 (not taken)
    dummy = emit(enc_l(OP_MVI, 10, 3));
    prog[j3] = enc_l(OP_JF, 11, prog.size());
    dummy = emit(enc_l(OP_STA, 10, 2207));
    p_sub = 500;
    jl    = emit(enc_l(OP_JAL, 12, p_sub));
    dummy = emit(enc_l(OP_STA, 13, 2208));
    dummy = emit(enc_l(OP_STA, 12, 2216));        // link value
    // push / pop
    dummy = emit(enc_l(OP_MVI, 20, 4000));
    dummy = emit(enc_x(X_PUSH, 20, 1));
    dummy = emit(enc_x(X_PUSH, 20, 2));
    dummy = emit(enc_x(X_POP, 20, 14));
    dummy = emit(enc_l(OP_STA, 14, 2209));
    dummy = emit(enc_l(OP_STA, 20, 2210));
    // pushm / popm
    for (int r = 0; r < 16; r++) dummy = emit(enc_l(OP_MVI, r, 1000 + r));
    dummy = emit(enc_l(OP_MVI, 21, 5000));
    dummy = emit(enc_x(X_PUSHM, 21));
    dummy = emit(enc_l(OP_STA, 21, 2321));
    for (int r = 0; r < 16; r++) dummy = emit(enc_l(OP_MVI, r, 0));
    dummy = emit(enc_x(X_POPM, 21));
    for (int r = 0; r < 16; r++) dummy = emit(enc_l(OP_STA, r, 2300 + r));
    dummy = emit(enc_l(OP_STA, 21, 2320));
    // cid, trap 1
    dummy = emit(enc_x(X_CID, 22));
    dummy = emit(enc_l(OP_STA, 22, 2211));
    dummy = emit(enc_l(OP_MVI, 30, 123));
    dummy = emit(enc_x(X_TRAP, 1));
    // software interrupt
    dummy = emit(enc_l(OP_MVI, 24, 0));
    dummy = emit(enc_x(X_INT));
    dummy = emit(enc_l(OP_STA, 23, 2212));
    // hardware interrupt through wfi
    dummy = emit(enc_x(X_EI));
    p_wfi = emit(enc_x(X_WFI));
    dummy = emit(enc_l(OP_STA, 24, 2213));
    // disabled interrupt stays pending until ei
    dummy = emit(enc_x(X_DI));
    for (int k = 0; k < 12; k++) dummy = emit(enc_l(OP_NOP, 0, 0));
    dummy = emit(enc_l(OP_STA, 24, 2214));
    dummy = emit(enc_x(X_EI));
    dummy = emit(enc_l(OP_STA, 24, 2215));
    // intx and sync
    dummy = emit(enc_l(OP_MVI, 25, 3));
    dummy = emit(enc_x(X_INTX, 25));
    p_sync = emit(enc_x(X_SYNC));
    dummy = emit(enc_l(OP_STA, 1, 2217));
    dummy = emit(enc_x(X_TRAP, 0));
    dummy = emit(enc_l(OP_STA, 1, 2218));         // never executed
    // subroutine
    while (prog.size() < p_sub) dummy = emit(0);
    dummy = emit(enc_l(OP_MVI, 13, 77));
    dummy = emit(enc_x(X_RET, 12));
    // interrupt service routine
    p_isr = 600;
    while (prog.size() < p_isr) dummy = emit(0);
    dummy = emit(enc_l(OP_MVI, 23, 55));
    dummy = emit(enc_d(OP_ADDI, 24, 24, 1));
    dummy = emit(enc_x(X_RETI));
    foreach (prog[i]) mem[i] = prog[i];
    mem[IVEC_BASE + CID] = p_isr;
    mem[3000] = 32'h1111_1111; mem[3005] = 32'h5555_5555; mem[3010] = 32'hAAAA_AAAA;

    // ---- run ----
    repeat (3) @(posedge clk);
    rst_n = 1;
    // stalls start at p_stall
    wait (exec_valid && dut.pc == word_t'(p_stall));
    stall_en = 1;
    // hardware interrupt while waiting in wfi
    wait (exec_valid && dut.pc == word_t'(p_wfi));
    repeat (20) @(posedge clk);
    @(negedge clk); irq = 1; @(negedge clk); irq = 0;
    // another one while interrupts are disabled (after the di)
    wait (exec_valid && dut.pc == word_t'(p_wfi + 4));
    @(negedge clk); irq = 1; @(negedge clk); irq = 0;
    // barrier release
    wait (sync_arrive);
    repeat (10) @(posedge clk);
    chk(sync_arrive, "core waits at sync");
    n_sync++;
    @(negedge clk); sync_go = 1; @(negedge clk); sync_go = 0;
    wait (halted);
    repeat (5) @(posedge clk);

    // ---- check ----
    for (int o = 0; o < 15; o++) begin
      chk(mem[2000 + o] == ref_alu(o, a1, a2), $sformatf("reg op %0d", o));
      chk(mem[2100 + o] == ref_alu(o, a1, word_t'(imm[o])), $sformatf("imm op %0d", o));
    end
    chk(mem[2200] == ~a2, "not");
    chk(mem[2201] == 32'h1111_1111, "ld absolute");
    chk(mem[2202] == 32'h5555_5555, "ld indirect");
    chk(mem[2203] == 32'hAAAA_AAAA, "ld index");
    chk(mem[3007] == 100, "st indirect");
    chk(mem[3010] == a2, "st index");
    chk(mem[2204] == a2, "mv");
    chk(mem[2205] == 0, "jmp");
    chk(mem[2206] == 0, "jt taken");
    chk(mem[2207] == 3, "jf not taken");
    chk(mem[2208] == 77, "jal/ret");
    chk(mem[2216] == word_t'(jl + 1), "jal link");
    chk(mem[4001] == 100 && mem[4002] == a2, "push");
    chk(mem[2209] == a2, "pop value");
    chk(mem[2210] == 4001, "pop sp");
    for (int r = 0; r < 16; r++) begin
      chk(mem[5001 + r] == word_t'(1000 + r), $sformatf("pushm R%0d", r));
      chk(mem[2300 + r] == word_t'(1000 + r), $sformatf("popm R%0d", r));
    end
    chk(mem[2321] == 5016, "pushm sp");
    chk(mem[2320] == 5000, "popm sp");
    chk(mem[2211] == CID, "cid");
    chk(n_trap1 == 1 && trap1_val == 123, "trap 1");
    chk(mem[2212] == 55, "int 0");
    chk(mem[2213] == 2, "wfi + hardware interrupt");
    chk(mem[2214] == 2, "di masks");
    chk(mem[2215] == 3, "pending taken after ei");
    chk(n_intx == 1 && intx_tgt == 3, "intx");
    chk(n_sync == 1 && mem[2217] == 1001, "sync");
    chk(halted && mem[2218] == 0, "trap 0 halts");
    // cycle counts (no stalls in this part)
    chk(exec_cyc[1] - exec_cyc[0] == 3, "ALU instruction takes 3 cycles");
    chk(exec_cyc[p_ld + 1] - exec_cyc[p_ld] == 5, "load takes 5 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
