// decoder_3to8: one-hot address decoder of the convolution FIR filter.
//
// Output line d[i] is 1 exactly when the address a equals i. In the filter,
// line d[n] selects which output sample y(n) is formed; lines 6 and 7 are
// spare and select nothing.
//
// Interface: a (ADDR_W bits), d (2**ADDR_W one-hot lines). Combinational.
//
// A 3:8 decoder with inputs A(2..0) and outputs D0..D7 follows the source
// design; it has no enable input.
module decoder_3to8 #(
  parameter int ADDR_W = 3
) (
  input  logic [ADDR_W-1:0]    a,
  output logic [2**ADDR_W-1:0] d
);

  always_comb begin
    d = '0;
    d[a] = 1'b1;
  end

endmodule
