// tb_s30_int_router: self-checking test of the interrupt router with 4 cores.
// Drives random external interrupt lines and random intx requests (targets
// 0..7, so some address no core) and compares every irq output with the
// expected OR of the external line and the intx requests aimed at that core.
module tb_s30_int_router;
  localparam int NC = 4;
  logic        ext_irq [NC];
  logic        intx_valid [NC];
  logic [31:0] intx_target [NC];
  logic        irq [NC];
  int          checks = 0, failures = 0;

  s30_int_router #(.NC(NC)) dut (.ext_irq(ext_irq), .intx_valid(intx_valid), .intx_target(intx_target), .irq(irq));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // core 2 sends to core 1, nothing else
    foreach (ext_irq[i]) begin ext_irq[i] = 0; intx_valid[i] = 0; intx_target[i] = 0; end
    intx_valid[2] = 1; intx_target[2] = 1;
    #1;
    checks++; if (!(irq[1] && !irq[0] && !irq[2] && !irq[3])) failures++;
    // a target beyond the last core reaches nobody
    intx_target[2] = 32'd4;
    #1;
    checks++; if (irq[0] || irq[1] || irq[2] || irq[3]) failures++;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < NC; i++) begin
        ext_irq[i]     = $urandom_range(0, 5) == 0;
        intx_valid[i]  = $urandom_range(0, 3) == 0;
        intx_target[i] = (n % 50 == 0) ? $urandom : 32'($urandom_range(0, 7));
      end
      #1;
      for (int j = 0; j < NC; j++) begin
        logic e;
        e = ext_irq[j];
        for (int i = 0; i < NC; i++) if (intx_valid[i] && intx_target[i] == 32'(j)) e = 1;
        checks++;
        if (irq[j] !== e) begin failures++; $display("FAIL core %0d irq=%b exp=%b", j, irq[j], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
