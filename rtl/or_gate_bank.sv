// or_gate_bank: OR gate bank of the convolution FIR filter.
//
// For each multiplier lane k, the gated words g[k][0..N_TAPS-1] from the AND
// gate bank are ORed together bit by bit. At most one of them is non-zero
// (one decoder line is active), so s[k] is the selected sample x(n-k), or 0
// when no sample is selected for that lane.
//
// Interface: g[k][j] (gated words), s[k] (selected word per lane).
// Combinational.
//
// The OR bank follows the source design, which draws trees of two-input OR
// gates; a loop of ORs is written here and maps to the same tree.
module or_gate_bank
  import fir_pkg::*;
#(
  parameter int DATA_W = 16
) (
  input  logic signed [DATA_W-1:0] g [N_TAPS][N_TAPS],
  output logic signed [DATA_W-1:0] s [N_TAPS]
);

  always_comb begin
    for (int k = 0; k < N_TAPS; k++) begin
      s[k] = '0;
      for (int j = 0; j < N_TAPS; j++) s[k] = s[k] | g[k][j];
    end
  end

endmodule
