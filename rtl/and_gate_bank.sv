// and_gate_bank: AND gate bank of the convolution FIR filter.
//
// Multiplier lane k (coefficient b(k)) is fed by one AND gate for each input
// sample x(j) with j <= N_TAPS-1-k. Gate (k, j) passes x(j) when decoder line
// d[j+k] is 1 and gives 0 otherwise. With address n, lane k thus carries
// x(n-k) at position j = n-k, and every other gate of the lane is 0; lanes
// with k > n carry nothing, which is the zero-padding of y(n) = sum b(k) x(n-k).
//
// Interface: d (decoder lines), x[0..N_TAPS-1] (samples), g[k][j] (gated
// words; positions without a gate are 0). Combinational.
//
// The gate count per lane (6, 5, 4, 3, 2, 1) and their enabling follow the
// source design; each gate is a word-wide AND.
module and_gate_bank
  import fir_pkg::*;
#(
  parameter int DATA_W = 16
) (
  input  logic [2**ADDR_W-1:0]     d,
  input  logic signed [DATA_W-1:0] x [N_TAPS],
  output logic signed [DATA_W-1:0] g [N_TAPS][N_TAPS]
);

  always_comb begin
    for (int k = 0; k < N_TAPS; k++) begin
      for (int j = 0; j < N_TAPS; j++) begin
        if (j + k < N_TAPS) g[k][j] = x[j] & {DATA_W{d[j+k]}};
        else                g[k][j] = '0;
      end
    end
  end

endmodule
