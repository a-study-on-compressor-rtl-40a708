// adder4_tb: exhaustive self-check of adder4.
// Applies all 512 combinations of a, b and cin and compares {cout, s}
// with the integer sum a+b+cin. A watchdog ends the run with a failure
// if it does not finish.
module adder4_tb;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  adder4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1;
      checks++;
      if ({cout, s} != 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures <= 10) $display("FAIL a=%0d b=%0d cin=%0b -> %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
