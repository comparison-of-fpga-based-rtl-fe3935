// tb_or_gate_bank: self-checking test of the OR gate bank. Each lane gets
// either a single non-zero word at a random position (the case the filter
// produces) or random words everywhere; s[k] must equal the bitwise OR of
// lane k.
module tb_or_gate_bank;
  localparam int DATA_W = 16;
  localparam int N = 6;

  logic clk = 0;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic signed [DATA_W-1:0] g [N][N];
  logic signed [DATA_W-1:0] s [N];

  or_gate_bank dut (.g, .s);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input bit sparse);
    logic signed [DATA_W-1:0] e [N];
    for (int k = 0; k < N; k++) begin
      int pos;
      pos = int'($urandom % N);
      e[k] = '0;
      for (int j = 0; j < N; j++) begin
        if (!sparse || j == pos) g[k][j] = DATA_W'($urandom);
        else                     g[k][j] = '0;
        e[k] = e[k] | g[k][j];
      end
    end
    #1;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (s[k] != e[k]) begin
        failures++;
        $display("lane %0d s=%h exp %h", k, s[k], e[k]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 300; r++) check_all(1'b1);
    for (int r = 0; r < 300; r++) check_all(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
