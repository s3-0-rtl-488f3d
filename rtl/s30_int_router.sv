// s30_int_router: delivers interrupt requests to the cores.
//
// A core that executes "intx r1" sends an interrupt signal to the core whose
// id is R[r1]; it presents that id on intx_target with intx_valid high for one
// cycle. Each core also has one external hardware interrupt line. The router
// raises irq[j] in the same cycle when the external line of core j is high or
// any core sends an intx to j. A target id of NC or more reaches no core. The
// cores latch irq into their own pending flag, so a one-cycle pulse is enough.
// Combinational; the wiring is this design's choice, the delivery rule is the
// instruction set's.
module s30_int_router #(
  parameter int unsigned NC = 4,
  parameter int unsigned W  = 32
) (
  input  logic         ext_irq     [NC],
  input  logic         intx_valid  [NC],
  input  logic [W-1:0] intx_target [NC],
  output logic         irq         [NC]
);

  always_comb begin
    for (int unsigned j = 0; j < NC; j++) begin
      irq[j] = ext_irq[j];
      for (int unsigned i = 0; i < NC; i++)
        if (intx_valid[i] && intx_target[i] == W'(j)) irq[j] = 1'b1;
    end
  end

endmodule
