// mux4: one-bit 4:1 multiplexer, the selection cell of the 5-3 compressor.
//
// y = d[sel]: d[0] is passed for sel = 0, d[3] for sel = 3.
// Purely combinational.
module mux4 (
  input  logic [3:0] d,
  input  logic [1:0] sel,
  output logic       y
);
  always_comb begin
    unique case (sel)
      2'd0: y = d[0];
      2'd1: y = d[1];
      2'd2: y = d[2];
      2'd3: y = d[3];
    endcase
  end
endmodule
