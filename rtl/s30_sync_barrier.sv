// s30_sync_barrier: the barrier behind the "sync" instruction.
//
// "sync" synchronises all cores: a core that executes it raises arrive and
// waits until go. go is high while every core is either arriving or halted
// (stopped by trap 0) and at least one core is arriving, so all waiting cores
// leave the barrier in the same cycle. Counting halted cores as present is
// this design's choice, so that a core that has finished cannot dead-lock the
// others. Combinational; the released cores drop arrive in the next cycle.
module s30_sync_barrier #(
  parameter int unsigned NC = 4
) (
  input  logic [NC-1:0] arrive,
  input  logic [NC-1:0] halted,
  output logic          go
);

  assign go = (&(arrive | halted)) && (|arrive);

endmodule
