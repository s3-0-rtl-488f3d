// tb_s30_system: end-to-end test of the S3.0 multicore system at its default
// size (4 cores, 4M-word shared memory).
//
// The host port loads one program that every core runs from address 0:
//   1. cid; each core sums 1..(20+cid) in a loop, doubles it in a
//      subroutine (jal/ret, push/pop) and stores it at M[2000+cid] (all cores
//      fetch and store at once: memory contention).
//   2. sync (barrier 1).
//   3. core 0 sends intx to cores 1..NC-1; every core then does wfi with
//      interrupts disabled, ei, and so takes its interrupt. The service routine
//      (vector M[1000+cid]) saves R[0..15] with pushm, counts into M[2100+cid],
//      restores with popm and returns with reti. Core 0 is woken by the
//      external interrupt line, which the testbench pulses.
//   4. sync (barrier 2); di; each core enters the same service routine by
//      the software interrupt "int 0"; core 0 adds the NC sums and prints them with trap 1;
//      each core prints the character 'A'+cid with trap 2 and stops (trap 0).
// The testbench checks the printed values, the memory contents read back
// through the host port, and that each mechanism happened: memory stalls,
// barrier releases, intx, wfi, hardware and software interrupt entries,
// jal/ret, push/pop, pushm/popm, traps, halts.
module tb_s30_system;
  import s30_pkg::*;
  import s30_asm_pkg::*;

  localparam int NC = 4;   // the system's default

  logic          clk = 0, rst_n = 0;
  logic          host_req = 0, host_we = 0, host_gnt, host_rvalid;
  word_t         host_addr = 0, host_wdata = 0, host_rdata;
  logic [NC-1:0] ext_irq = '0, trap_valid, halted, exec_valid;
  ridx_t         trap_code [NC];
  word_t         trap_value [NC];

  s30_system dut (
    .clk(clk), .rst_n(rst_n),
    .host_req(host_req), .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .host_gnt(host_gnt), .host_rvalid(host_rvalid), .host_rdata(host_rdata),
    .ext_irq(ext_irq), .trap_valid(trap_valid), .trap_code(trap_code), .trap_value(trap_value),
    .halted(halted), .exec_valid(exec_valid)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host port ----
  task automatic host_write(word_t a, word_t v);
    @(negedge clk); host_req = 1; host_we = 1; host_addr = a; host_wdata = v;
    do @(posedge clk); while (!host_gnt);
    @(negedge clk); host_req = 0; host_we = 0;
  endtask

  task automatic host_read(word_t a, output word_t v);
    @(negedge clk); host_req = 1; host_we = 0; host_addr = a;
    do @(posedge clk); while (!host_gnt);
    @(negedge clk); host_req = 0;
    while (!host_rvalid) @(negedge clk);
    v = host_rdata;
  endtask

  // ---- event counters ----
  int n_stall = 0, n_sync = 0, n_intx = 0, n_wfi = 0, n_irq = 0, n_pushm = 0, n_popm = 0;
  int n_trap1 = 0, n_trap2 = 0, n_instr = 0;
  int n_swint = 0, n_jal = 0, n_ret = 0, n_push = 0, n_pop = 0;
  word_t trap1_val;
  logic [NC-1:0] chars_seen = '0;
  for (genvar c = 0; c < NC; c++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.req[c].req && !dut.rsp[c].gnt) n_stall++;
      if (dut.g_core[c].u_core.take_irq) n_irq++;
      if (dut.g_core[c].u_core.intx_valid) n_intx++;
      if (exec_valid[c]) n_instr++;
      if (exec_valid[c] && dut.g_core[c].u_core.d.op == OP_JAL) n_jal++;
      if (exec_valid[c] && dut.g_core[c].u_core.is_x) begin
        if (dut.g_core[c].u_core.d.xop == 12'(X_WFI))   n_wfi++;
        if (dut.g_core[c].u_core.d.xop == 12'(X_PUSHM)) n_pushm++;
        if (dut.g_core[c].u_core.d.xop == 12'(X_POPM))  n_popm++;
        if (dut.g_core[c].u_core.d.xop == 12'(X_INT))   n_swint++;
        if (dut.g_core[c].u_core.d.xop == 12'(X_RET))   n_ret++;
        if (dut.g_core[c].u_core.d.xop == 12'(X_PUSH))  n_push++;
        if (dut.g_core[c].u_core.d.xop == 12'(X_POP))   n_pop++;
      end
      if (trap_valid[c] && trap_code[c] == 5'd1) begin
        n_trap1++; trap1_val = trap_value[c];
        $display("core %0d prints %0d", c, $signed(trap_value[c]));
      end
      if (trap_valid[c] && trap_code[c] == 5'd2) begin
        n_trap2++;
        $display("core %0d prints '%c'", c, trap_value[c][7:0]);
        if (trap_value[c] == word_t'(65 + c)) chars_seen[c] = 1'b1;
      end
    end
  end
  always @(posedge clk) if (rst_n && dut.sync_go) n_sync++;

  // ---- program ----
  word_t prog [$];
  function automatic int emit(word_t w);
    prog.push_back(w);
    return prog.size() - 1;
  endfunction

  localparam int ISR = 300;
  localparam int SUB = 250;

  initial begin
    int d, loop1, j_other, loop2, j_common, loop3, j_skip, cyc0;
    word_t v, sum;
    // 1. per-core sum
    d = emit(enc_x(X_CID, 1));
    d = emit(enc_d(OP_MULI, 29, 1, 100));
    d = emit(enc_d(OP_ADDI, 29, 29, 6000));       // stack pointer 6000+100*cid
    d = emit(enc_l(OP_MVI, 2, 0));
    d = emit(enc_l(OP_MVI, 3, 0));
    d = emit(enc_d(OP_ADDI, 4, 1, 20));
    loop1 = emit(enc_d(OP_ADDI, 2, 2, 1));
    d = emit(enc_x(X_ADD, 3, 3, 2));
    d = emit(enc_x(X_LT, 5, 2, 4));
    d = emit(enc_l(OP_JT, 5, loop1));
    d = emit(enc_l(OP_JAL, 12, SUB));             // R[3] = R[3] * 2 via a subroutine
    d = emit(enc_d(OP_STD, 3, 1, 2000));
    d = emit(enc_l(OP_LDA, 6, 1999));             // NC
    // 2. barrier 1
    d = emit(enc_x(X_SYNC));
    // 3. core 0 interrupts the others
    j_other = emit(0);
    d = emit(enc_l(OP_MVI, 7, 1));
    loop2 = emit(enc_x(X_INTX, 7));
    d = emit(enc_d(OP_ADDI, 7, 7, 1));
    d = emit(enc_x(X_LT, 5, 7, 6));
    d = emit(enc_l(OP_JT, 5, loop2));
    prog[j_other] = enc_l(OP_JT, 1, prog.size());
    d = emit(enc_x(X_WFI));
    d = emit(enc_x(X_EI));
    d = emit(enc_l(OP_NOP, 0, 0));
    // 4. barrier 2, results
    d = emit(enc_x(X_SYNC));
    d = emit(enc_x(X_DI));
    d = emit(enc_x(X_INT));                        // software interrupt
    j_skip = emit(0);
    d = emit(enc_l(OP_MVI, 30, 0));
    d = emit(enc_l(OP_MVI, 7, 0));
    d = emit(enc_l(OP_MVI, 9, 2000));
    loop3 = emit(enc_x(X_LDX, 8, 9, 7));
    d = emit(enc_x(X_ADD, 30, 30, 8));
    d = emit(enc_d(OP_ADDI, 7, 7, 1));
    d = emit(enc_x(X_LT, 5, 7, 6));
    d = emit(enc_l(OP_JT, 5, loop3));
    d = emit(enc_x(X_TRAP, 1));
    prog[j_skip] = enc_l(OP_JT, 1, prog.size());
    d = emit(enc_l(OP_MVI, 30, 65));
    d = emit(enc_x(X_ADD, 30, 30, 1));
    d = emit(enc_x(X_TRAP, 2));
    d = emit(enc_x(X_TRAP, 0));
    // subroutine: pushes R[3], pops it into R[13], returns 2*R[13] in R[3]
    while (prog.size() < SUB) d = emit(0);
    d = emit(enc_x(X_PUSH, 29, 3));
    d = emit(enc_x(X_POP, 29, 13));
    d = emit(enc_x(X_ADD, 3, 13, 13));
    d = emit(enc_x(X_RET, 12));
    // interrupt service routine
    while (prog.size() < ISR) d = emit(0);
    d = emit(enc_x(X_PUSHM, 29));
    d = emit(enc_l(OP_MVI, 2, -1));               // clobbered, restored by popm
    d = emit(enc_d(OP_LDD, 24, 1, 2100));
    d = emit(enc_d(OP_ADDI, 24, 24, 1));
    d = emit(enc_d(OP_STD, 24, 1, 2100));
    d = emit(enc_x(X_POPM, 29));
    d = emit(enc_d(OP_STD, 2, 1, 2200));          // R[2] as restored
    d = emit(enc_x(X_RETI));

    // ---- load through the host port while the cores are in reset ----
    repeat (2) @(posedge clk);
    foreach (prog[i]) host_write(word_t'(i), prog[i]);
    for (int c = 0; c < NC; c++) begin
      host_write(word_t'(IVEC_BASE + c), word_t'(ISR));
      host_write(word_t'(2100 + c), 0);
    end
    host_write(1999, NC);

    // ---- run ----
    @(negedge clk); rst_n = 1;
    cyc0 = 0;
    // wake core 0 once the intx messages are out
    wait (n_intx == NC - 1);
    repeat (30) @(posedge clk);
    @(negedge clk); ext_irq[0] = 1; @(negedge clk); ext_irq[0] = 0;
    wait (&halted);
    repeat (3) @(posedge clk);

    // ---- check ----
    host_read(word_t'(loop1), v);
    chk(v == prog[loop1], "program read back through the host port");
    sum = 0;
    for (int c = 0; c < NC; c++) begin
      word_t e;
      e = word_t'((20 + c) * (21 + c));          // twice the sum 1..20+c
      sum += e;
      host_read(word_t'(2000 + c), v); chk(v == e, $sformatf("core %0d sum", c));
      host_read(word_t'(2100 + c), v); chk(v == 2, $sformatf("core %0d hardware and software interrupt", c));
      host_read(word_t'(2200 + c), v); chk(v == word_t'(20 + c), $sformatf("core %0d popm restored R2", c));
    end
    chk(n_trap1 == 1 && trap1_val == sum, "trap 1 prints the total");
    chk(n_trap2 == NC && chars_seen == '1, "trap 2 prints A+cid on every core");
    // every mechanism happened
    chk(n_stall > 0, "memory contention stalled a core");
    chk(n_sync == 2, "two barrier releases");
    chk(n_intx == NC - 1, "intx sent to every other core");
    chk(n_wfi == NC, "every core executed wfi");
    chk(n_irq == NC, "one hardware interrupt entry per core");
    chk(n_swint == NC, "one software interrupt per core");
    chk(n_jal == NC && n_ret == NC, "jal/ret on every core");
    chk(n_push == NC && n_pop == NC, "push/pop on every core");
    chk(n_pushm == 2 * NC && n_popm == 2 * NC, "pushm/popm in each service routine");
    chk(&halted, "all cores halted by trap 0");
    $display("instructions=%0d stalls=%0d syncs=%0d intx=%0d wfi=%0d irq=%0d int0=%0d pushm=%0d popm=%0d",
             n_instr, n_stall, n_sync, n_intx, n_wfi, n_irq, n_swint, n_pushm, n_popm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
