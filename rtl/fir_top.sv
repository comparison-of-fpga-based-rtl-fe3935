// fir_top: the two implementations of the 6-tap low-pass FIR filter, side by
// side.
//
// fir_direct is the clocked direct-form filter: one sample x per clock, one
// output y per clock, from a delay line of five registers. fir_conv is the
// delay-free convolution filter: six samples x0 .. x5 at once, and the address
// a picks which output y_conv = y(a) is formed, with no clock. Both hold the
// same coefficients and arithmetic, so feeding fir_direct the sequence
// x0, x1, ... and reading its output at step n gives the same word as
// fir_conv with a = n (for the first six outputs after a reset).
//
// Interface: ck, rstbar, x, y belong to the direct form; a, x0 .. x5, y_conv
// to the convolution filter. All samples are signed Q8.8.
//
// Holding the two structures as independent filters follows the source
// design, which implements both and compares their impulse responses.
module fir_top
  import fir_pkg::*;
#(
  parameter int DATA_W = 16
) (
  // direct form
  input  logic                     ck,
  input  logic                     rstbar,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W-1:0] y,
  // convolution structure
  input  logic [ADDR_W-1:0]        a,
  input  logic signed [DATA_W-1:0] x0,
  input  logic signed [DATA_W-1:0] x1,
  input  logic signed [DATA_W-1:0] x2,
  input  logic signed [DATA_W-1:0] x3,
  input  logic signed [DATA_W-1:0] x4,
  input  logic signed [DATA_W-1:0] x5,
  output logic signed [DATA_W-1:0] y_conv
);

  fir_direct #(.DATA_W(DATA_W)) u_direct (.ck, .rstbar, .x, .y);

  fir_conv #(.DATA_W(DATA_W)) u_conv (
    .a, .x0, .x1, .x2, .x3, .x4, .x5, .y(y_conv)
  );

endmodule
