// comp15_4: 15-4 compressor. Counts the ones among fifteen input bits and
// returns the count (0..15) as a 4-bit number.
//
// Structure, as the design gives it: five full adders u0..u4 each reduce
// three inputs (u0 takes i[2:0], u1 i[5:3], ..., u4 i[14:12]) to a sum
// bit of weight 1 and a carry bit of weight 2. The 5-3 compressor u5
// counts the five sum bits, u6 the five carry bits. The 4-bit parallel
// adder u7 adds u5's count to u6's count shifted up one place:
// z = cnt(sums) + 2*cnt(carries) <= 5 + 10 = 15, so u7's carry out is
// always 0 and is left unused. The input grouping is this
// implementation's choice; any grouping gives the same count.
//
// Interface: i[14:0] in, z[3:0] out. Purely combinational.
module comp15_4 (
  input  logic [14:0] i,
  output logic [3:0]  z
);
  logic [4:0] s, c;     // sum and carry bits of u0..u4
  logic [2:0] ns, nc;   // counts of sums (u5) and carries (u6)
  logic       co_unused;

  full_adder u0 (.a(i[0]),  .b(i[1]),  .c(i[2]),  .s(s[0]), .co(c[0]));
  full_adder u1 (.a(i[3]),  .b(i[4]),  .c(i[5]),  .s(s[1]), .co(c[1]));
  full_adder u2 (.a(i[6]),  .b(i[7]),  .c(i[8]),  .s(s[2]), .co(c[2]));
  full_adder u3 (.a(i[9]),  .b(i[10]), .c(i[11]), .s(s[3]), .co(c[3]));
  full_adder u4 (.a(i[12]), .b(i[13]), .c(i[14]), .s(s[4]), .co(c[4]));

  comp5_3    u5 (.i(s), .z(ns));
  comp5_3    u6 (.i(c), .z(nc));

  // The sum of at most 15 never carries out of bit 3, so cout is unused.
  adder4     u7 (.a({1'b0, ns}), .b({nc, 1'b0}), .cin(1'b0), .s(z), .cout(co_unused));
endmodule
