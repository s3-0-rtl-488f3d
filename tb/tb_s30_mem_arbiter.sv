// tb_s30_mem_arbiter: self-checking test of the round-robin memory arbiter
// with 5 requesters and a small memory behind it. Random requesters issue
// reads and writes and hold them until granted. Checks: at most one grant per
// cycle, a grant only to a requester that asks, rvalid exactly one cycle after
// the grant to the same requester, read data against a shadow memory, and
// fairness: with all requesters busy, no requester waits more than N grants.
module tb_s30_mem_arbiter;
  import s30_pkg::*;
  localparam int N  = 5;
  localparam int AW = 6;

  logic          clk = 0, rst_n = 0;
  mem_req_t      req [N];
  mem_rsp_t      rsp [N];
  logic          m_req, m_we;
  logic [AW-1:0] m_addr;
  word_t         m_wdata, m_rdata;
  word_t         shadow [2**AW];
  int            checks = 0, failures = 0;
  int            wait_cnt [N];
  logic          pend_rd [N];
  word_t         pend_exp [N];
  logic          pend_v [N];

  s30_mem_arbiter #(.N(N), .AW(AW)) dut (.clk(clk), .rst_n(rst_n), .req(req), .rsp(rsp),
    .m_req(m_req), .m_we(m_we), .m_addr(m_addr), .m_wdata(m_wdata), .m_rdata(m_rdata));
  s30_mem #(.AW(AW)) u_mem (.clk(clk), .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int heavy;  // 1: every requester always requests

  initial begin
    for (int i = 0; i < N; i++) begin req[i] = '0; wait_cnt[i] = 0; pend_v[i] = 0; end
    // initialise memory through requester 0, one word at a time
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      req[0] = '{req: 1'b1, we: 1'b1, addr: word_t'(a), wdata: word_t'(a * 3 + 1)};
      shadow[a] = word_t'(a * 3 + 1);
      #1;
      chk(rsp[0].gnt, "lone requester granted at once");
    end
    @(negedge clk); req[0] = '0;
    for (int phase = 0; phase < 2; phase++) begin
      heavy = phase;
      for (int n = 0; n < 4000; n++) begin
        int ngnt;
        @(negedge clk);
        // answers to last cycle's grants; granted requests are done
        for (int i = 0; i < N; i++) begin
          if (pend_v[i]) begin
            chk(rsp[i].rvalid, "rvalid one cycle after grant");
            if (pend_rd[i]) chk(rsp[i].rdata == pend_exp[i], "read data");
            pend_v[i]  = 0;
            req[i].req = 1'b0;
          end else begin
            chk(!rsp[i].rvalid, "spurious rvalid");
          end
        end
        // new requests from idle requesters
        for (int i = 0; i < N; i++)
          if (!req[i].req && (heavy == 1 || $urandom_range(0, 2) == 0)) begin
            req[i].req   = 1'b1;
            req[i].we    = $urandom_range(0, 1) == 1;
            req[i].addr  = word_t'($urandom_range(0, 2**AW - 1));
            req[i].wdata = $urandom;
            wait_cnt[i]  = 0;
          end
        #1;
        ngnt = 0;
        for (int i = 0; i < N; i++) begin
          if (rsp[i].gnt) begin
            ngnt++;
            chk(req[i].req, "grant without request");
            pend_v[i]   = 1;
            pend_rd[i]  = !req[i].we;
            pend_exp[i] = shadow[req[i].addr[AW-1:0]];
            if (req[i].we) shadow[req[i].addr[AW-1:0]] = req[i].wdata;
          end else if (req[i].req) begin
            wait_cnt[i]++;
            chk(wait_cnt[i] < N, "round-robin bound");
          end
        end
        chk(ngnt <= 1, "one grant per cycle");
        chk(ngnt == 1 || !(req[0].req | req[1].req | req[2].req | req[3].req | req[4].req), "work conserving");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
