// delay_line: chain of z^-1 registers for the direct-form FIR filter.
//
// DEPTH registers of DATA_W bits are chained; on every rising edge of ck each
// stage takes the value of the stage before it and stage 0 takes x. taps[i]
// therefore holds the input seen i+1 clocks earlier, x(n-1-i).
//
// Interface: ck (rising edge), rstbar (asynchronous, active low: clears every
// stage to 0), x (new sample), taps[0..DEPTH-1] (delayed samples). One clock
// of latency per stage.
//
// Five D flip-flop stages follow the source design; the asynchronous reset
// to zero is this design's choice.
module delay_line #(
  parameter int DATA_W = 16,
  parameter int DEPTH  = 5
) (
  input  logic                     ck,
  input  logic                     rstbar,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W-1:0] taps [DEPTH]
);

  always_ff @(posedge ck or negedge rstbar) begin
    if (!rstbar) begin
      for (int i = 0; i < DEPTH; i++) taps[i] <= '0;
    end else begin
      taps[0] <= x;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
