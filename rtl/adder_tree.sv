// adder_tree: bank of adders that sums the six products of the convolution
// FIR filter.
//
// Five two-input adders in a tree: p0+p1, p2+p3 and p4+p5 first, then the
// first two sums, then that result plus the third. Each level grows the word
// by one bit, so the sum is exact.
//
// Interface: p[0..5] (signed IN_W-bit products), sum (signed IN_W+3 bits).
// Combinational.
//
// The grouping follows the source design's drawing of its adder bank; the
// word growth is this design's choice.
module adder_tree
  import fir_pkg::*;
#(
  parameter int IN_W = 24
) (
  input  logic signed [IN_W-1:0] p [N_TAPS],
  output logic signed [IN_W+2:0] sum
);

  logic signed [IN_W:0]   s01, s23, s45;
  logic signed [IN_W+1:0] s0123;

  always_comb begin
    s01   = (IN_W+1)'(p[0]) + (IN_W+1)'(p[1]);
    s23   = (IN_W+1)'(p[2]) + (IN_W+1)'(p[3]);
    s45   = (IN_W+1)'(p[4]) + (IN_W+1)'(p[5]);
    s0123 = (IN_W+2)'(s01) + (IN_W+2)'(s23);
    sum   = (IN_W+3)'(s0123) + (IN_W+3)'(s45);
  end

endmodule
