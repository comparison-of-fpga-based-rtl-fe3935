// coef_mult: multiply a signed sample by a constant coefficient with shifts
// and adds only.
//
// For every bit i set in COEF, a copy of x shifted left by i is added; all
// shifts are wiring, so the block is a small adder chain with no clock. For
// the filter coefficients this gives 4x = x<<2, 16x = x<<4 and
// 114x = (x<<6)+(x<<5)+(x<<4)+(x<<1).
//
// Interface: x is a signed DATA_W-bit sample, p the exact signed product
// x * COEF, COEF_W bits wider than x. Combinational, zero latency.
//
// Multiplication by shifting follows the source design, which names a shift
// register as its multiplier; building it as fixed wired shifts (possible
// because the coefficient is a constant) and keeping the product exact are
// this design's choices.
module coef_mult #(
  parameter int                DATA_W = 16,
  parameter int                COEF_W = 8,
  parameter logic [COEF_W-1:0] COEF   = 8'd114
) (
  input  logic signed [DATA_W-1:0]        x,
  output logic signed [DATA_W+COEF_W-1:0] p
);

  localparam int PW = DATA_W + COEF_W;

  always_comb begin
    logic signed [PW-1:0] acc;
    acc = '0;
    for (int i = 0; i < COEF_W; i++) begin
      if (COEF[i]) acc = acc + (PW'(x) <<< i);
    end
    p = acc;
  end

endmodule
