// tb_delay_line: self-checking test of the z^-1 register chain. Random
// samples are clocked in; after every rising edge taps[i] must hold the
// sample applied i+1 clocks before (0 for clocks before the reset). An
// asynchronous reset in mid-stream must clear every stage at once.
module tb_delay_line;
  localparam int DATA_W = 16;
  localparam int DEPTH  = 5;

  logic ck = 0;
  logic rstbar;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic signed [DATA_W-1:0] x;
  logic signed [DATA_W-1:0] taps [DEPTH];
  logic signed [DATA_W-1:0] hist [DEPTH];   // reference: hist[i] = x(n-1-i)

  delay_line dut (.ck, .rstbar, .x, .taps);

  always #5 ck = ~ck;
  always @(posedge ck) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (taps[i] != hist[i]) begin
        failures++;
        $display("cycle %0d tap %0d = %h exp %h", cycles, i, taps[i], hist[i]);
      end
    end
  endtask

  task automatic step(input logic signed [DATA_W-1:0] v);
    x = v;
    @(posedge ck);
    for (int i = DEPTH - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    #1;
    compare();
  endtask

  initial begin
    x = '0;
    rstbar = 1'b0;
    for (int i = 0; i < DEPTH; i++) hist[i] = '0;
    repeat (2) @(posedge ck);
    #1 compare();
    rstbar = 1'b1;
    for (int n = 0; n < 300; n++) step(DATA_W'($urandom));
    // asynchronous reset between clock edges
    #2 rstbar = 1'b0;
    #1;
    for (int i = 0; i < DEPTH; i++) hist[i] = '0;
    compare();
    @(negedge ck) rstbar = 1'b1;
    for (int n = 0; n < 50; n++) step(DATA_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
