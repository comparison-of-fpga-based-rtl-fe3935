// fir_conv: delay-free convolution FIR filter (the proposed structure).
//
// The six input samples x(0) .. x(5) are presented at once, and the 3-bit
// address a chooses which output y(a) = sum_k b(k) x(a-k) of their
// convolution with the filter coefficients is formed (terms with a-k < 0 are
// zero). The datapath has no register:
//   decoder_3to8   turns a into one active line D(a);
//   and_gate_bank  lets x(j) onto multiplier lane k only when D(j+k) is set;
//   or_gate_bank   merges each lane into one word, x(a-k) or 0;
//   coef_mult x6   multiply lane k by b(k) with shifts and adds;
//   adder_tree     adds the six exact products.
// The sum is shifted right by FRAC_W (toward minus infinity) and its low
// DATA_W bits are y, the same arithmetic as fir_direct, so for the same
// samples both filters give identical words.
//
// Interface: a (address 0..5; 6 and 7 give y = 0), x0 .. x5 (signed Q8.8
// samples), y (signed Q8.8 output). Timing: purely combinational, zero
// clocks of latency; one output per address value.
//
// The decoder / AND bank / OR bank / multiplier / adder-bank structure and
// its wiring follow the source design; the word widths, the exact products
// with a single final scaling, and y = 0 on the spare addresses are this
// design's choices.
module fir_conv
  import fir_pkg::*;
#(
  parameter int DATA_W = 16
) (
  input  logic [ADDR_W-1:0]        a,
  input  logic signed [DATA_W-1:0] x0,
  input  logic signed [DATA_W-1:0] x1,
  input  logic signed [DATA_W-1:0] x2,
  input  logic signed [DATA_W-1:0] x3,
  input  logic signed [DATA_W-1:0] x4,
  input  logic signed [DATA_W-1:0] x5,
  output logic signed [DATA_W-1:0] y
);

  localparam int PW = DATA_W + COEF_W;

  logic [2**ADDR_W-1:0]     d;
  logic signed [DATA_W-1:0] xs   [N_TAPS];
  logic signed [DATA_W-1:0] g    [N_TAPS][N_TAPS];
  logic signed [DATA_W-1:0] s    [N_TAPS];
  logic signed [PW-1:0]     prod [N_TAPS];
  logic signed [PW+2:0]     sum;

  assign xs = '{x0, x1, x2, x3, x4, x5};

  decoder_3to8 #(.ADDR_W(ADDR_W)) u_dec (.a, .d);

  // The OR bank acts as a multiplexer only while a single decoder line is
  // active, so that at most one AND gate of a lane is open.
  always_comb begin
    assert ($onehot(d)) else $error("fir_conv: decoder output %b is not one-hot", d);
  end

  and_gate_bank #(.DATA_W(DATA_W)) u_and (.d, .x(xs), .g);

  or_gate_bank #(.DATA_W(DATA_W)) u_or (.g, .s);

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    coef_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF(COEFS[k])) u_mult (
      .x(s[k]), .p(prod[k])
    );
  end

  adder_tree #(.IN_W(PW)) u_add (.p(prod), .sum);

  // The FRAC_W bits below the output and the guard bits above it are
  // dropped on purpose: floor rounding and wrap-around.
  assign y = sum[FRAC_W +: DATA_W];

endmodule
