// half_adder: one-bit half adder.
//
// Adds two equally weighted bits a and b into a sum bit s = a ^ b
// (weight 1) and a carry bit co = a & b (weight 2). Used where a column
// of a ripple chain has only two operands. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
