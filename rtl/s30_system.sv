// s30_system: the S3.0 multicore processor, top level.
//
// NC identical S3.0 cores (core ids 0..NC-1) share one word-addressed memory
// of 2**MEM_AW words. Around them sit the three pieces that make them a
// multicore: the memory arbiter that serialises their accesses, the interrupt
// router that carries "intx" signals and the external hardware interrupt lines
// to the cores, and the barrier behind "sync". Each core finds its interrupt
// vector at M[1000+core_id].
//
// Interface: a host port (one more requester on the memory arbiter, same
// req/gnt/rvalid protocol as a core: gnt in the cycle the access is taken,
// rvalid and rdata one cycle later) loads programs and reads results, usually
// while rst_n holds the cores in reset (the memory itself is not reset). Each
// core has an external interrupt input and a trap port: trap_valid pulses for
// one cycle when the core executes "trap n", with n on trap_code and R[30] on
// trap_value (trap 1 prints it as an integer, trap 2 as a character, trap 0
// stops the core, which then shows halted). exec_valid marks each cycle in
// which a core executes an instruction.
//
// The instruction set fixes the 32-bit word, the 22-bit direct address (4M
// words, the default MEM_AW) and the vector address; the number of cores is
// not given and defaults to 4 here, and all cores start at address RESET_PC.
module s30_system
  import s30_pkg::*;
#(
  parameter int unsigned NC       = 4,
  parameter int unsigned MEM_AW   = 22,
  parameter word_t       RESET_PC = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  // host access to the shared memory
  input  logic          host_req,
  input  logic          host_we,
  input  word_t         host_addr,
  input  word_t         host_wdata,
  output logic          host_gnt,
  output logic          host_rvalid,
  output word_t         host_rdata,
  // per-core external interrupt lines
  input  logic [NC-1:0] ext_irq,
  // per-core trap port and status
  output logic [NC-1:0] trap_valid,
  output ridx_t         trap_code  [NC],
  output word_t         trap_value [NC],
  output logic [NC-1:0] halted,
  output logic [NC-1:0] exec_valid
);

  mem_req_t req [NC+1];
  mem_rsp_t rsp [NC+1];

  logic          irq        [NC];
  logic          ext_irq_a  [NC];
  logic          intx_valid [NC];
  word_t         intx_target[NC];
  logic [NC-1:0] sync_arrive;
  logic          sync_go;

  for (genvar c = 0; c < int'(NC); c++) begin : g_core
    s30_core #(.CORE_ID(c), .RESET_PC(RESET_PC)) u_core (
      .clk        (clk),
      .rst_n      (rst_n),
      .mreq       (req[c]),
      .mrsp       (rsp[c]),
      .irq        (irq[c]),
      .intx_valid (intx_valid[c]),
      .intx_target(intx_target[c]),
      .sync_arrive(sync_arrive[c]),
      .sync_go    (sync_go),
      .trap_valid (trap_valid[c]),
      .trap_code  (trap_code[c]),
      .trap_value (trap_value[c]),
      .halted     (halted[c]),
      .exec_valid (exec_valid[c])
    );
    assign ext_irq_a[c] = ext_irq[c];
  end

  // host is the last requester
  always_comb begin
    req[NC].req   = host_req;
    req[NC].we    = host_we;
    req[NC].addr  = host_addr;
    req[NC].wdata = host_wdata;
  end
  assign host_gnt    = rsp[NC].gnt;
  assign host_rvalid = rsp[NC].rvalid;
  assign host_rdata  = rsp[NC].rdata;

  logic              m_req, m_we;
  logic [MEM_AW-1:0] m_addr;
  word_t             m_wdata, m_rdata;

  s30_mem_arbiter #(.N(NC + 1), .AW(MEM_AW)) u_arb (
    .clk(clk), .rst_n(rst_n), .req(req), .rsp(rsp),
    .m_req(m_req), .m_we(m_we), .m_addr(m_addr), .m_wdata(m_wdata), .m_rdata(m_rdata)
  );

  s30_mem #(.AW(MEM_AW), .W(XLEN)) u_mem (
    .clk(clk), .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  s30_int_router #(.NC(NC), .W(XLEN)) u_irq (
    .ext_irq(ext_irq_a), .intx_valid(intx_valid), .intx_target(intx_target), .irq(irq)
  );

  s30_sync_barrier #(.NC(NC)) u_sync (
    .arrive(sync_arrive), .halted(halted), .go(sync_go)
  );

endmodule
