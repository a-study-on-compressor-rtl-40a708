// full_adder: one-bit full adder, the 3:2 counter that every compressor in
// this design is built from.
//
// Adds three equally weighted bits a, b, c and returns their count as a
// sum bit s (weight 1) and a carry bit co (weight 2). s is the XOR of the
// three inputs and co their majority. Purely combinational, no clock.
// The cell itself is the textbook one; the compressors only require its
// function.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end
endmodule
