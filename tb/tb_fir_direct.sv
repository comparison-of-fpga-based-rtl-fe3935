// tb_fir_direct: self-checking test of the direct-form FIR filter.
// 1. Impulse: after reset, x = 1.0 (16'h0100) for one clock and 0 after it;
//    y must be 4, 16, 114, 114, 16, 4 (units of 1/256) in the same clock
//    period as the impulse and the five after it, then 0: zero latency and
//    a response exactly six samples long.
// 2. Step of 1.0: y must follow the running sums of the coefficients.
// 3. Random signed samples, including full-scale ones that wrap: y is
//    compared every period with a model that keeps its own history of x and
//    computes floor(sum b(k) x(n-k) / 256) modulo 2^16.
// A mid-stream reset must clear the history.
module tb_fir_direct;
  localparam int DATA_W = 16;
  localparam int N = 6;
  localparam int C [N] = '{4, 16, 114, 114, 16, 4};

  logic ck = 0;
  logic rstbar;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic signed [DATA_W-1:0] x, y;
  logic signed [DATA_W-1:0] hist [N];       // hist[k] = x(n-k) of the model

  fir_direct dut (.ck, .rstbar, .x, .y);

  always #5 ck = ~ck;
  always @(posedge ck) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DATA_W-1:0] model();
    longint acc = 0;
    for (int k = 0; k < N; k++) acc += longint'(C[k]) * longint'(hist[k]);
    return DATA_W'(acc >>> 8);
  endfunction

  // Apply v for one clock period; check y against exp (or the model when
  // use_model is set) just before the rising edge.
  task automatic period(input logic signed [DATA_W-1:0] v, input bit use_model,
                        input logic signed [DATA_W-1:0] exp);
    logic signed [DATA_W-1:0] e;
    @(negedge ck);
    x = v;
    for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    #3;
    e = use_model ? model() : exp;
    checks++;
    if (y != e) begin
      failures++;
      $display("cycle %0d x=%h y=%h exp %h", cycles, v, y, e);
    end
  endtask

  task automatic do_reset();
    @(negedge ck);
    rstbar = 1'b0;
    x = '0;
    for (int k = 0; k < N; k++) hist[k] = '0;
    @(negedge ck);
    rstbar = 1'b1;
  endtask

  initial begin
    rstbar = 1'b0;
    x = '0;
    do_reset();
    // 1. impulse
    period(16'sh0100, 0, 16'sh0004);
    period(16'sh0000, 0, 16'sh0010);
    period(16'sh0000, 0, 16'sh0072);
    period(16'sh0000, 0, 16'sh0072);
    period(16'sh0000, 0, 16'sh0010);
    period(16'sh0000, 0, 16'sh0004);
    period(16'sh0000, 0, 16'sh0000);
    period(16'sh0000, 0, 16'sh0000);
    // 2. step
    period(16'sh0100, 0, 16'sh0004);
    period(16'sh0100, 0, 16'sh0014);
    period(16'sh0100, 0, 16'sh0086);
    period(16'sh0100, 0, 16'sh00f8);
    period(16'sh0100, 0, 16'sh0108);
    period(16'sh0100, 0, 16'sh010c);
    period(16'sh0100, 0, 16'sh010c);
    // 3. random, with a reset in the middle
    for (int n = 0; n < 500; n++) period(DATA_W'($urandom), 1, '0);
    do_reset();
    for (int n = 0; n < 500; n++) period(DATA_W'($urandom), 1, '0);
    for (int n = 0; n < 20; n++) period(16'sh7fff, 1, '0);
    for (int n = 0; n < 20; n++) period(-16'sh8000, 1, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
