// comp15_4_tb: exhaustive self-check of the 15-input compressor comp15_4.
// First applies the input patterns whose counts are printed in the
// design's simulated waveforms, then every one of the 2**15 input
// vectors, and compares z with $countones(i) computed by the simulator.
// Combinational, so each vector is sampled one time unit after it is applied.
// A watchdog ends the run with a failure if it does not finish.
module comp15_4_tb;
  logic [14:0] i;
  logic [3:0] z;
  int checks = 0, failures = 0;

  comp15_4 dut (.i(i), .z(z));

  task automatic check(input logic [14:0] v, input int expect_z);
    i = v;
    #1;
    checks++;
    if (int'(z) != expect_z) begin
      failures++;
      if (failures <= 10) $display("FAIL i=%b z=%0d expected %0d", v, z, expect_z);
    end
  endtask

  initial begin
    #66536;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Vectors printed in the 15-4 waveform.
    check(15'b000000000001111, 4);
    check(15'b000000001111111, 7);
    check(15'b000000011111111, 8);
    check(15'b111111111111111, 15);
    for (int v = 0; v < (1 << 15); v++)
      check(15'(v), $countones(15'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
