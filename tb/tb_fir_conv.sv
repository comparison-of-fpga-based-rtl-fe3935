// tb_fir_conv: self-checking test of the delay-free convolution FIR filter.
// 1. Impulse: x0 = 1.0 (16'h0100), x1..x5 = 0; addresses 0..5 must give
//    4, 16, 114, 114, 16, 4 (units of 1/256), and the spare addresses 6, 7
//    must give 0.
// 2. Random signed samples at every address, compared with
//    floor(sum_{k<=a} b(k) x(a-k) / 256) modulo 2^16 worked out here.
// The output is sampled 1 time unit after the inputs change: the block has
// no clock and no latency.
module tb_fir_conv;
  localparam int DATA_W = 16;
  localparam int N = 6;
  localparam int C [N] = '{4, 16, 114, 114, 16, 4};

  logic clk = 0;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic [2:0]               a;
  logic signed [DATA_W-1:0] xs [N];
  logic signed [DATA_W-1:0] y;

  fir_conv dut (
    .a, .x0(xs[0]), .x1(xs[1]), .x2(xs[2]), .x3(xs[3]), .x4(xs[4]), .x5(xs[5]), .y
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DATA_W-1:0] model(input int n);
    longint acc = 0;
    for (int k = 0; k < N; k++)
      if (n - k >= 0 && n < N) acc += longint'(C[k]) * longint'(xs[n-k]);
    return DATA_W'(acc >>> 8);
  endfunction

  task automatic check_addr(input int n, input logic signed [DATA_W-1:0] e);
    a = 3'(n);
    #1;
    checks++;
    if (y != e) begin
      failures++;
      $display("a=%0d y=%h exp %h", n, y, e);
    end
  endtask

  localparam logic signed [DATA_W-1:0] IMP [8] =
    '{16'sh0004, 16'sh0010, 16'sh0072, 16'sh0072, 16'sh0010, 16'sh0004, 16'sh0000, 16'sh0000};

  initial begin
    // 1. impulse
    xs[0] = 16'sh0100;
    for (int j = 1; j < N; j++) xs[j] = '0;
    for (int n = 0; n < 8; n++) check_addr(n, IMP[n]);
    // 2. random
    for (int r = 0; r < 1000; r++) begin
      for (int j = 0; j < N; j++) xs[j] = DATA_W'($urandom);
      for (int n = 0; n < 8; n++) check_addr(n, model(n));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
