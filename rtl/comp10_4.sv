// comp10_4: 10-4 compressor. Counts the ones among ten input bits and
// returns the count (0..10, at most 4'b1010) as a 4-bit number.
//
// Structure, as the design gives it: two 5-3 compressors (a1 on i[4:0],
// a2 on i[9:5]) each produce a 3-bit count; a half adder (a4) and two full
// adders (a3, a5) add the two counts in a ripple chain, and the last
// carry is result bit 3. The half adder sits at bit 0, where there is no
// carry in yet; the full adders at bits 1 and 2. That placement and the
// input split are this implementation's reading; any split gives the same
// count.
//
// Interface: i[9:0] in, z[3:0] out. Purely combinational.
module comp10_4 (
  input  logic [9:0] i,
  output logic [3:0] z
);
  logic [2:0] p, q;   // counts of the two halves
  logic [2:1] c;      // ripple carries

  comp5_3    a1 (.i(i[4:0]), .z(p));
  comp5_3    a2 (.i(i[9:5]), .z(q));

  half_adder a4 (.a(p[0]), .b(q[0]),               .s(z[0]), .co(c[1]));
  full_adder a3 (.a(p[1]), .b(q[1]), .c(c[1]),     .s(z[1]), .co(c[2]));
  full_adder a5 (.a(p[2]), .b(q[2]), .c(c[2]),     .s(z[2]), .co(z[3]));
endmodule
