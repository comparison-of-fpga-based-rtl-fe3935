// fir_direct: direct-form 6-tap low-pass FIR filter.
//
// Computes y(n) = b0 x(n) + b1 x(n-1) + ... + b5 x(n-5) with the coefficients
// of fir_pkg. A delay_line of five z^-1 registers holds x(n-1) .. x(n-5); the
// current input and the five taps each go through a constant coef_mult, and a
// chain of five adders sums the products from tap 0 to tap 5. The exact sum is
// shifted right by FRAC_W (rounding toward minus infinity) and its low DATA_W
// bits are the output, so a result outside the Q8.8 range wraps.
//
// Interface: ck, rstbar (active-low asynchronous reset of the delay line),
// x (signed Q8.8 sample), y (signed Q8.8 output).
// Timing: y is combinational from x and the delay line, so y(n) is valid in
// the same clock period as x(n); the delay line shifts on the rising edge of
// ck. An impulse x = 1.0 applied for one period gives y = 4, 16, 114, 114,
// 16, 4 (in units of 1/256) over six consecutive periods.
//
// The structure (delay chain, six taps, adder chain), the coefficients and
// the 16-bit ports follow the source design; the output scaling, wrap-around
// and reset behaviour are this design's choices.
module fir_direct
  import fir_pkg::*;
#(
  parameter int DATA_W = 16
) (
  input  logic                     ck,
  input  logic                     rstbar,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W-1:0] y
);

  localparam int PW = DATA_W + COEF_W;    // product width
  localparam int SW = PW + 3;             // sum width: 6 terms need 3 more bits

  logic signed [DATA_W-1:0] taps [N_TAPS-1];
  logic signed [DATA_W-1:0] xin  [N_TAPS];
  logic signed [PW-1:0]     prod [N_TAPS];
  logic signed [SW-1:0]     acc;

  delay_line #(.DATA_W(DATA_W), .DEPTH(N_TAPS-1)) u_delay (
    .ck, .rstbar, .x, .taps
  );

  always_comb begin
    xin[0] = x;
    for (int k = 1; k < N_TAPS; k++) xin[k] = taps[k-1];
  end

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    coef_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF(COEFS[k])) u_mult (
      .x(xin[k]), .p(prod[k])
    );
  end

  // Adder chain: ((((p0 + p1) + p2) + p3) + p4) + p5.
  always_comb begin
    acc = SW'(prod[0]);
    for (int k = 1; k < N_TAPS; k++) acc = acc + SW'(prod[k]);
  end

  // The FRAC_W bits below the output and the guard bits above it are
  // dropped on purpose: floor rounding and wrap-around.
  assign y = acc[FRAC_W +: DATA_W];

endmodule
