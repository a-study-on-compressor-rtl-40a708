// comp10_4_tb: exhaustive self-check of the 10-input compressor comp10_4.
// First applies the input patterns whose counts are printed in the
// design's simulated waveforms, then every one of the 2**10 input
// vectors, and compares z with $countones(i) computed by the simulator.
// Combinational, so each vector is sampled one time unit after it is applied.
// A watchdog ends the run with a failure if it does not finish.
module comp10_4_tb;
  logic [9:0] i;
  logic [3:0] z;
  int checks = 0, failures = 0;

  comp10_4 dut (.i(i), .z(z));

  task automatic check(input logic [9:0] v, input int expect_z);
    i = v;
    #1;
    checks++;
    if (int'(z) != expect_z) begin
      failures++;
      if (failures <= 10) $display("FAIL i=%b z=%0d expected %0d", v, z, expect_z);
    end
  endtask

  initial begin
    #3048;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Vectors printed in the 10-4 waveform.
    check(10'b1100000000, 2);
    check(10'b0110011000, 4);
    check(10'b1101100110, 6);
    check(10'b1111111111, 10);
    for (int v = 0; v < (1 << 10); v++)
      check(10'(v), $countones(10'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
