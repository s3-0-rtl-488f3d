// s30_regfile: the 32 x 32-bit general register file of an S3.0 core.
//
// Three asynchronous read ports (an X-format instruction names up to three
// registers, e.g. st r1 +r2 r3 reads all three) and one synchronous write
// port. Unlike the earlier S2.1 design, R[0] is an ordinary register here and
// can be written. A write becomes visible on the read ports in the cycle after
// the clock edge that performs it. Reset clears every register to 0 (the
// instruction set does not specify a reset value; clearing is this design's
// choice).
module s30_regfile
  import s30_pkg::*;
#(
  parameter int unsigned N = NREG,
  parameter int unsigned W = XLEN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ra1,
  input  logic [$clog2(N)-1:0] ra2,
  input  logic [$clog2(N)-1:0] ra3,
  output logic [W-1:0]         rd1,
  output logic [W-1:0]         rd2,
  output logic [W-1:0]         rd3,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  logic [W-1:0]         wd
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
  assign rd3 = regs[ra3];

endmodule
