// compressor_top: the four compressor adders side by side.
//
// The 5-3, 10-4, 15-4 and 20-5 compressors are independent bit counters
// meant as building blocks for the partial-product reduction of a
// multiplier; nothing connects them to each other here, so each has its
// own input vector and count output. (The larger ones contain the smaller
// as sub-blocks.) Purely combinational: an output is valid one
// combinational delay after its input changes.
//
// Interface: iN in, zN out, for N = 5, 10, 15, 20; zN = number of ones in iN.
module compressor_top (
  input  logic [4:0]  i5,
  output logic [2:0]  z5,
  input  logic [9:0]  i10,
  output logic [3:0]  z10,
  input  logic [14:0] i15,
  output logic [3:0]  z15,
  input  logic [19:0] i20,
  output logic [4:0]  z20
);
  comp5_3  u_c5  (.i(i5),  .z(z5));
  comp10_4 u_c10 (.i(i10), .z(z10));
  comp15_4 u_c15 (.i(i15), .z(z15));
  comp20_5 u_c20 (.i(i20), .z(z20));
endmodule
