// mux4_tb: exhaustive self-check of mux4.
// Applies all 64 combinations of d and sel and compares y with bit sel of
// d. A watchdog ends the run with a failure if it does not finish.
module mux4_tb;
  logic [3:0] d;
  logic [1:0] sel;
  logic       y;
  int checks = 0, failures = 0;

  mux4 dut (.d(d), .sel(sel), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {sel, d} = 6'(v);
      #1;
      checks++;
      if (y != ((d >> sel) & 4'b1) ) begin
        failures++;
        if (failures <= 10) $display("FAIL d=%b sel=%0d -> y=%0b", d, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
