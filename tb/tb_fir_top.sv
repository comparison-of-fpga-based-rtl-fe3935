// tb_fir_top: end-to-end test of both filter structures at their default
// sizes.
// One operation is: reset the direct form, clock six samples x(0)..x(5) into
// it one per period, and at the same time present the same six samples to
// the convolution filter with address a = n. In period n both outputs must
// equal y(n) = floor(sum_{k<=n} b(k) x(n-k) / 256) modulo 2^16 computed here,
// so the two structures are checked against the model and against each
// other. Operations run:
//   impulse  x(0) = 1.0, rest 0 (expected 4, 16, 114, 114, 16, 4)
//   step     all six samples 1.0
//   random   random signed samples, some at full scale so the output wraps
// After each operation the spare addresses 6 and 7 are applied (y_conv = 0)
// and the direct form is kept running on further samples, checked against
// the model alone. Every mechanism (impulse, step, each address, spare
// address, reset, output wrap, run past six samples) is counted and one that
// never happened counts as a failure.
module tb_fir_top;
  localparam int DATA_W = 16;
  localparam int N = 6;
  localparam int C [N] = '{4, 16, 114, 114, 16, 4};

  logic ck = 0;
  logic rstbar;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic signed [DATA_W-1:0] x, y, y_conv;
  logic [2:0]               a;
  logic signed [DATA_W-1:0] xs [N];
  logic signed [DATA_W-1:0] hist [N];       // hist[k] = x(n-k) of the model

  // mechanism counters
  int n_impulse = 0, n_step = 0, n_random = 0, n_spare = 0, n_reset = 0;
  int n_wrap = 0, n_stream = 0;
  int n_addr [N];

  fir_top dut (
    .ck, .rstbar, .x, .y,
    .a, .x0(xs[0]), .x1(xs[1]), .x2(xs[2]), .x3(xs[3]), .x4(xs[4]), .x5(xs[5]),
    .y_conv
  );

  always #5 ck = ~ck;
  always @(posedge ck) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model output for the current history; flags a result outside Q8.8.
  function automatic logic signed [DATA_W-1:0] model(output bit wrapped);
    longint acc = 0;
    longint q;
    for (int k = 0; k < N; k++) acc += longint'(C[k]) * longint'(hist[k]);
    q = acc >>> 8;
    wrapped = (q > 32767) || (q < -32768);
    return DATA_W'(q);
  endfunction

  task automatic check(input string what, input logic signed [DATA_W-1:0] got,
                       input logic signed [DATA_W-1:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("cycle %0d %s = %h, expected %h", cycles, what, got, exp);
    end
  endtask

  task automatic do_reset();
    @(negedge ck);
    rstbar = 1'b0;
    x = '0;
    for (int k = 0; k < N; k++) hist[k] = '0;
    @(negedge ck);
    rstbar = 1'b1;
    n_reset++;
  endtask

  // One operation on the samples in s.
  task automatic operation(input logic signed [DATA_W-1:0] s [N]);
    logic signed [DATA_W-1:0] e;
    bit w;
    do_reset();
    xs = s;
    for (int n = 0; n < N; n++) begin
      @(negedge ck);
      x = s[n];
      a = 3'(n);
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = s[n];
      #3;
      e = model(w);
      if (w) n_wrap++;
      n_addr[n]++;
      check("y (direct)", y, e);
      check("y_conv", y_conv, e);
    end
    for (int sp = 6; sp < 8; sp++) begin
      a = 3'(sp);
      #0.4;
      check("y_conv spare address", y_conv, '0);
      n_spare++;
    end
    // keep the direct form running past the six samples
    for (int n = 0; n < 4; n++) begin
      @(negedge ck);
      x = DATA_W'($urandom);
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      #3;
      e = model(w);
      if (w) n_wrap++;
      check("y (direct, stream)", y, e);
      n_stream++;
    end
  endtask

  logic signed [DATA_W-1:0] s [N];
  logic signed [DATA_W-1:0] imp_exp [N] = '{16'sh0004, 16'sh0010, 16'sh0072, 16'sh0072, 16'sh0010, 16'sh0004};

  initial begin
    foreach (n_addr[i]) n_addr[i] = 0;
    rstbar = 1'b0;
    x = '0;
    a = '0;
    for (int k = 0; k < N; k++) begin xs[k] = '0; hist[k] = '0; end

    // impulse, with the printed expected words checked directly as well
    s = '{16'sh0100, 16'sh0, 16'sh0, 16'sh0, 16'sh0, 16'sh0};
    do_reset();
    xs = s;
    for (int n = 0; n < N; n++) begin
      @(negedge ck);
      x = s[n];
      a = 3'(n);
      #3;
      check("impulse y (direct)", y, imp_exp[n]);
      check("impulse y_conv", y_conv, imp_exp[n]);
    end
    operation(s);
    n_impulse++;

    // step
    s = '{16'sh0100, 16'sh0100, 16'sh0100, 16'sh0100, 16'sh0100, 16'sh0100};
    operation(s);
    n_step++;

    // random, small and full scale
    for (int r = 0; r < 300; r++) begin
      for (int j = 0; j < N; j++)
        s[j] = (r % 3 == 0) ? DATA_W'($urandom) : DATA_W'($signed(DATA_W'($urandom)) >>> 4);
      operation(s);
      n_random++;
    end
    // guaranteed wrap: all samples at the positive limit
    s = '{16'sh7fff, 16'sh7fff, 16'sh7fff, 16'sh7fff, 16'sh7fff, 16'sh7fff};
    operation(s);

    $display("mechanisms: impulse=%0d step=%0d random=%0d reset=%0d spare_addr=%0d wrap=%0d stream=%0d",
             n_impulse, n_step, n_random, n_reset, n_spare, n_wrap, n_stream);
    $display("address uses: %0d %0d %0d %0d %0d %0d",
             n_addr[0], n_addr[1], n_addr[2], n_addr[3], n_addr[4], n_addr[5]);
    checks++;
    if (n_impulse == 0 || n_step == 0 || n_random == 0 || n_reset == 0 ||
        n_spare == 0 || n_wrap == 0 || n_stream == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    foreach (n_addr[i]) begin
      checks++;
      if (n_addr[i] == 0) begin failures++; $display("address %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
