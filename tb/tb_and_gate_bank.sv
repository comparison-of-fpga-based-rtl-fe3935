// tb_and_gate_bank: self-checking test of the AND gate bank. Random samples
// are applied with every one-hot decoder pattern and with random multi-hot
// patterns; every gate output g[k][j] must equal x[j] when k+j < 6 and line
// d[j+k] is set, and 0 otherwise.
module tb_and_gate_bank;
  localparam int DATA_W = 16;
  localparam int N = 6;

  logic clk = 0;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic [7:0]               d;
  logic signed [DATA_W-1:0] x [N];
  logic signed [DATA_W-1:0] g [N][N];

  and_gate_bank dut (.d, .x, .g);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input logic [7:0] dv);
    logic signed [DATA_W-1:0] e;
    d = dv;
    for (int j = 0; j < N; j++) x[j] = DATA_W'($urandom);
    #1;
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) begin
        e = (k + j < N && dv[j+k]) ? x[j] : '0;
        checks++;
        if (g[k][j] != e) begin
          failures++;
          $display("d=%b k=%0d j=%0d g=%h exp %h", dv, k, j, g[k][j], e);
        end
      end
  endtask

  initial begin
    for (int r = 0; r < 20; r++)
      for (int i = 0; i < 8; i++) check_all(8'b1 << i);
    for (int r = 0; r < 100; r++) check_all(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
