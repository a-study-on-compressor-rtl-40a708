// comp5_3: 5-3 compressor. Counts the ones among five input bits and
// returns the count (0..5, at most 3'b101) as a 3-bit number.
//
// Structure: three 4:1 multiplexers n2, n3, n4, one per result bit, share
// one select. The select k = i[0]+i[1]+i[2] (0..3) comes from a full adder.
// The mux data inputs are simple functions of the two remaining bits i[3]
// and i[4]: with l = i[3]^i[4], h = i[3]&i[4], o = i[3]|i[4] the count is
// k + (i[3]+i[4]), and for each k the result bits are
//   k=0: z = {h, h, l}      k=1: z = {0, o, ~l}
//   k=2: z = {h, ~h, l}     k=3: z = {o, ~o, ~l}
// The use of three 4:1 muxes for the three result bits follows the
// design; the full adder that makes the select and the gates in front of
// the data inputs are this implementation's own choice.
//
// Interface: i[4:0] in, z[2:0] out. Purely combinational.
module comp5_3 (
  input  logic [4:0] i,
  output logic [2:0] z
);
  logic [1:0] k;      // count of i[2:0], mux select
  logic       l, h, o;

  full_adder u_sel (.a(i[0]), .b(i[1]), .c(i[2]), .s(k[0]), .co(k[1]));

  always_comb begin
    l = i[3] ^ i[4];
    h = i[3] & i[4];
    o = i[3] | i[4];
  end

  // n2: result bit 0
  mux4 u_n2 (.d({~l, l, ~l, l}), .sel(k), .y(z[0]));
  // n3: result bit 1
  mux4 u_n3 (.d({~o, ~h, o, h}), .sel(k), .y(z[1]));
  // n4: result bit 2
  mux4 u_n4 (.d({o, h, 1'b0, 1'b0}), .sel(k), .y(z[2]));
endmodule
