// comp5_3_tb: exhaustive self-check of the 5-input compressor comp5_3.
// First applies the input patterns whose counts are printed in the
// design's simulated waveforms, then every one of the 2**5 input
// vectors, and compares z with $countones(i) computed by the simulator.
// Combinational, so each vector is sampled one time unit after it is applied.
// A watchdog ends the run with a failure if it does not finish.
module comp5_3_tb;
  logic [4:0] i;
  logic [2:0] z;
  int checks = 0, failures = 0;

  comp5_3 dut (.i(i), .z(z));

  task automatic check(input logic [4:0] v, input int expect_z);
    i = v;
    #1;
    checks++;
    if (int'(z) != expect_z) begin
      failures++;
      if (failures <= 10) $display("FAIL i=%b z=%0d expected %0d", v, z, expect_z);
    end
  endtask

  initial begin
    #1064;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Full scale: all five inputs high gives 3'b101.
    check(5'b11111, 5);
    for (int v = 0; v < (1 << 5); v++)
      check(5'(v), $countones(5'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
