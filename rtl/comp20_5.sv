// comp20_5: 20-5 compressor. Counts the ones among twenty input bits and
// returns the count (0..20, at most 5'b10100) as a 5-bit number.
//
// Structure, as the design gives it: the 15-4 compressor u8 counts
// i[14:0] into a 4-bit value p, the 5-3 compressor u9 counts i[19:15]
// into a 3-bit value q. A ripple chain of full and half adders adds them:
// half adder at bit 0 (two operands, no carry yet), full adders at bits 1
// and 2, half adder at bit 3 (q has no bit 3), and the final carry is
// result bit 4. The cell-per-bit placement and the input split are this
// implementation's reading of the design.
//
// Interface: i[19:0] in, z[4:0] out. Purely combinational.
module comp20_5 (
  input  logic [19:0] i,
  output logic [4:0]  z
);
  logic [3:0] p;      // count of i[14:0]
  logic [2:0] q;      // count of i[19:15]
  logic [3:1] c;      // ripple carries

  comp15_4   u8 (.i(i[14:0]),  .z(p));
  comp5_3    u9 (.i(i[19:15]), .z(q));

  half_adder h0 (.a(p[0]), .b(q[0]),           .s(z[0]), .co(c[1]));
  full_adder f1 (.a(p[1]), .b(q[1]), .c(c[1]), .s(z[1]), .co(c[2]));
  full_adder f2 (.a(p[2]), .b(q[2]), .c(c[2]), .s(z[2]), .co(c[3]));
  half_adder h3 (.a(p[3]), .b(c[3]),           .s(z[3]), .co(z[4]));
endmodule
