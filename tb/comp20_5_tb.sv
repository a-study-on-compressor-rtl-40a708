// comp20_5_tb: exhaustive self-check of the 20-input compressor comp20_5.
// First applies the input patterns whose counts are printed in the
// design's simulated waveforms, then every one of the 2**20 input
// vectors, and compares z with $countones(i) computed by the simulator.
// Combinational, so each vector is sampled one time unit after it is applied.
// A watchdog ends the run with a failure if it does not finish.
module comp20_5_tb;
  logic [19:0] i;
  logic [4:0] z;
  int checks = 0, failures = 0;

  comp20_5 dut (.i(i), .z(z));

  task automatic check(input logic [19:0] v, input int expect_z);
    i = v;
    #1;
    checks++;
    if (int'(z) != expect_z) begin
      failures++;
      if (failures <= 10) $display("FAIL i=%b z=%0d expected %0d", v, z, expect_z);
    end
  endtask

  initial begin
    #2098152;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Full scale, printed in the 20-5 waveform as 5'b10100.
    check(20'hFFFFF, 20);
    for (int v = 0; v < (1 << 20); v++)
      check(20'(v), $countones(20'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
