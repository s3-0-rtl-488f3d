// s30_mem: shared main memory of the S3.0 system.
//
// Word-addressed (the addressing unit of the instruction set is the 32-bit
// word) single-port RAM with 2**AW words. The default AW = 22 gives the 4M
// words that ld/st/jmp reach with their 22-bit direct address field. An access
// presented with req high is performed at the clock edge; for a read, rdata
// holds the word from the cycle after (one-cycle latency, synchronous read, a
// write does not update rdata). The contents are not reset. Everything beyond
// the size and the word addressing is this design's choice: the instruction
// set does not describe the memory system.
module s30_mem #(
  parameter int unsigned AW = 22,
  parameter int unsigned W  = 32
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
