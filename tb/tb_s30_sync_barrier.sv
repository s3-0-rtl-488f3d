// tb_s30_sync_barrier: self-checking test of the sync barrier with 4 cores.
// Checks every combination of arriving and halted cores exhaustively: go must
// be high exactly when each core is arriving or halted and at least one core
// is arriving.
module tb_s30_sync_barrier;
  localparam int NC = 4;
  logic [NC-1:0] arrive, halted;
  logic          go;
  int            checks = 0, failures = 0;

  s30_sync_barrier #(.NC(NC)) dut (.arrive(arrive), .halted(halted), .go(go));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int h = 0; h < 16; h++) begin
        logic exp;
        arrive = 4'(a); halted = 4'(h);
        #1;
        exp = 1;
        for (int i = 0; i < NC; i++) if (!arrive[i] && !halted[i]) exp = 0;
        if (arrive == 0) exp = 0;
        checks++;
        if (go !== exp) begin failures++; $display("FAIL arrive=%b halted=%b go=%b", arrive, halted, go); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
