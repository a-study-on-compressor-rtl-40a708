// compressor_top_tb: end-to-end self-check of compressor_top at its
// default (and only) size.
//
// Steps a 20-bit counter v through all 2**20 values and drives
//   i20 = v, i15 = v[14:0], i10 = v[9:0] ^ v[19:10], i5 = v[4:0] ^ v[19:15]
// so every compressor sees every one of its input vectors at least once.
// Each output is compared with $countones of its input, one time unit after the
// inputs change. Besides the plain checks it counts, per compressor, how
// often the result reached full scale (all inputs high) and how often the
// top result bit was set (the final carry of the 10-4 and 20-5 ripple
// chains, bit 2 of the 5-3 mux n4, bit 3 of the 15-4 adder u7); a
// compressor for which either event never happened counts as a failure.
// A watchdog ends the run with a failure if it does not finish.
module compressor_top_tb;
  logic [4:0]  i5;
  logic [2:0]  z5;
  logic [9:0]  i10;
  logic [3:0]  z10;
  logic [14:0] i15;
  logic [3:0]  z15;
  logic [19:0] i20;
  logic [4:0]  z20;
  int checks = 0, failures = 0;
  int full_scale [4];
  int top_bit    [4];

  compressor_top dut (.*);

  task automatic cmp(input string name, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", name, got, want);
    end
  endtask

  initial begin
    #(2 * (1 << 20) + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (full_scale[k]) begin
      full_scale[k] = 0;
      top_bit[k]    = 0;
    end
    for (int v = 0; v < (1 << 20); v++) begin
      i20 = 20'(v);
      i15 = i20[14:0];
      i10 = i20[9:0] ^ i20[19:10];
      i5  = i20[4:0] ^ i20[19:15];
      #1;
      cmp("5-3",  int'(z5),  $countones(i5));
      cmp("10-4", int'(z10), $countones(i10));
      cmp("15-4", int'(z15), $countones(i15));
      cmp("20-5", int'(z20), $countones(i20));
      if (&i5)  full_scale[0]++;
      if (&i10) full_scale[1]++;
      if (&i15) full_scale[2]++;
      if (&i20) full_scale[3]++;
      if (z5[2])  top_bit[0]++;
      if (z10[3]) top_bit[1]++;
      if (z15[3]) top_bit[2]++;
      if (z20[4]) top_bit[3]++;
    end
    $display("full-scale results: 5-3 %0d, 10-4 %0d, 15-4 %0d, 20-5 %0d",
             full_scale[0], full_scale[1], full_scale[2], full_scale[3]);
    $display("top result bit set: 5-3 %0d, 10-4 %0d, 15-4 %0d, 20-5 %0d",
             top_bit[0], top_bit[1], top_bit[2], top_bit[3]);
    for (int k = 0; k < 4; k++) begin
      checks += 2;
      if (full_scale[k] == 0) begin
        failures++;
        $display("FAIL compressor %0d never reached full scale", k);
      end
      if (top_bit[k] == 0) begin
        failures++;
        $display("FAIL compressor %0d never set its top result bit", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
