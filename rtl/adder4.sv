// adder4: 4-bit parallel adder, the final stage (u7) of the 15-4 compressor.
//
// Adds two 4-bit words and a carry in through a ripple chain of four
// full_adder cells; bit k's carry feeds bit k+1 and the last carry is
// cout. Combinational; the delay is four carry stages. The compressor
// design only calls for "a 4 bit parallel adder", so the ripple chain is
// the simplest choice, not a prescribed structure.
module adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [4:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < 4; k++) begin : g_bit
    full_adder u_fa (.a(a[k]), .b(b[k]), .c(c[k]), .s(s[k]), .co(c[k+1]));
  end

  assign cout = c[4];
endmodule
