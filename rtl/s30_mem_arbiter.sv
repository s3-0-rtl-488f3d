// s30_mem_arbiter: connects N requesters (the cores and a host port) to the
// single port of the shared memory.
//
// All cores of the S3.0 system see one memory M[]; this arbiter serialises
// their accesses, one per clock. Each requester holds a mem_req_t with req
// high until it sees gnt. The grant is combinational and round-robin: the
// search starts just after the requester granted last, so a waiting requester
// is served within N grants. The granted request goes to the memory in the same
// cycle; in the next cycle the arbiter raises rvalid for that requester,
// together with the memory's rdata (for a write, rvalid only acknowledges).
// How the cores share memory is not described by the instruction set; this
// arbitration scheme and the host port are this design's choices.
module s30_mem_arbiter
  import s30_pkg::*;
#(
  parameter int unsigned N  = 5,
  parameter int unsigned AW = 22
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mem_req_t      req [N],
  output mem_rsp_t      rsp [N],
  // memory side
  output logic          m_req,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output word_t         m_wdata,
  input  word_t         m_rdata
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;      // requester granted most recently
  logic          any_gnt;
  logic [IW-1:0] gnt_id;
  logic          resp_q;      // an access was granted last cycle
  logic [IW-1:0] resp_id_q;   // ... to this requester

  // Round-robin search starting after last_q
  always_comb begin
    any_gnt = 1'b0;
    gnt_id  = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last_q) + k) % N);
      if (!any_gnt && req[idx].req) begin
        any_gnt = 1'b1;
        gnt_id  = IW'(idx);
      end
    end
  end

  assign m_req   = any_gnt;
  assign m_we    = req[gnt_id].we;
  assign m_addr  = req[gnt_id].addr[AW-1:0];
  assign m_wdata = req[gnt_id].wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q    <= IW'(N - 1);
      resp_q    <= 1'b0;
      resp_id_q <= '0;
    end else begin
      resp_q <= any_gnt;
      if (any_gnt) begin
        last_q    <= gnt_id;
        resp_id_q <= gnt_id;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      rsp[i].gnt    = any_gnt && (gnt_id == IW'(i));
      rsp[i].rvalid = resp_q && (resp_id_q == IW'(i));
      rsp[i].rdata  = m_rdata;
    end
  end

  // A granted requester must have been requesting
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      assert (!rsp[i].gnt || req[i].req);
  end

endmodule
