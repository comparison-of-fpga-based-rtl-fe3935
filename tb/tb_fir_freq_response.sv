// tb_fir_freq_response: frequency response of the filter, measured on the
// direct form inside fir_top at its default size.
// Sinusoids of amplitude 64.0 at w = m*pi/10 (m = 1 .. 9) are clocked in.
// After the six-sample start-up the output is correlated with sin(wn) and
// cos(wn) over 2000 samples (a whole number of periods), which gives the
// measured complex gain. It must match H(w) = sum b(k) exp(-jwk), worked out
// here from the coefficient words, to within 0.002 in each part; this checks
// both the magnitude and the linear phase of -2.5w.
// Also checked exactly: DC gain (64.0 in gives 67.0 out, 268/256) and a zero
// at w = pi (alternating +-64.0 gives 0).
module tb_fir_freq_response;
  localparam int  DATA_W = 16;
  localparam int  N      = 6;
  localparam real B [N]  = '{4.0, 16.0, 114.0, 114.0, 16.0, 4.0};
  localparam real PI     = 3.14159265358979323846;
  localparam real AMP    = 16384.0;          // 64.0 in Q8.8
  localparam int  NS     = 2000;             // measured samples
  localparam real TOL    = 0.002;

  logic ck = 0;
  logic rstbar;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic signed [DATA_W-1:0] x, y, y_conv;
  logic [2:0]               a = '0;
  logic signed [DATA_W-1:0] z = '0;

  fir_top dut (
    .ck, .rstbar, .x, .y,
    .a, .x0(z), .x1(z), .x2(z), .x3(z), .x4(z), .x5(z), .y_conv
  );

  always #5 ck = ~ck;
  always @(posedge ck) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge ck);
    rstbar = 1'b0;
    x = '0;
    @(negedge ck);
    rstbar = 1'b1;
  endtask

  // Apply one sample and return the output of the same period.
  task automatic sample(input logic signed [DATA_W-1:0] v, output real out);
    @(negedge ck);
    x = v;
    #3;
    out = real'(y);
  endtask

  initial begin
    real yo, s, c, w, hr, hi, mr, mi;
    rstbar = 1'b0;
    x = '0;

    // DC
    do_reset();
    for (int n = 0; n < 10; n++) begin
      sample(16'sh4000, yo);
      if (n >= N - 1) begin
        checks++;
        if (yo != 17152.0) begin failures++; $display("DC: y=%0f expected 17152", yo); end
      end
    end

    // w = pi
    do_reset();
    for (int n = 0; n < 10; n++) begin
      sample((n % 2) ? -16'sh4000 : 16'sh4000, yo);
      if (n >= N - 1) begin
        checks++;
        if (yo != 0.0) begin failures++; $display("w=pi: y=%0f expected 0", yo); end
      end
    end

    // sinusoids
    for (int m = 1; m < 10; m++) begin
      w = PI * m / 10.0;
      hr = 0.0;
      hi = 0.0;
      for (int k = 0; k < N; k++) begin
        hr += B[k] / 256.0 * $cos(w * k);
        hi -= B[k] / 256.0 * $sin(w * k);
      end
      do_reset();
      s = 0.0;
      c = 0.0;
      for (int n = 0; n < NS + N; n++) begin
        sample(DATA_W'($rtoi(AMP * $sin(w * n) + ((AMP * $sin(w * n) >= 0.0) ? 0.5 : -0.5))), yo);
        if (n >= N) begin
          s += yo * $sin(w * n);
          c += yo * $cos(w * n);
        end
      end
      mr = 2.0 * s / (AMP * NS);
      mi = 2.0 * c / (AMP * NS);
      $display("w=%0.1fpi  |H| measured %0.4f (%0.2f dB), expected %0.4f (%0.2f dB)",
               m / 10.0, $sqrt(mr * mr + mi * mi), 20.0 * $log10($sqrt(mr * mr + mi * mi) + 1e-12),
               $sqrt(hr * hr + hi * hi), 20.0 * $log10($sqrt(hr * hr + hi * hi) + 1e-12));
      checks += 2;
      if ((mr - hr) > TOL || (hr - mr) > TOL) begin
        failures++; $display("  real part %0f, expected %0f", mr, hr);
      end
      if ((mi - hi) > TOL || (hi - mi) > TOL) begin
        failures++; $display("  imaginary part %0f, expected %0f", mi, hi);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
