// tb_adder_tree: self-checking test of the six-input adder tree. Random and
// extreme signed products are applied and the output must equal their exact
// integer sum.
module tb_adder_tree;
  localparam int IN_W = 24;
  localparam int N = 6;

  logic clk = 0;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic signed [IN_W-1:0] p [N];
  logic signed [IN_W+2:0] sum;

  adder_tree dut (.p, .sum);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    longint e;
    #1;
    e = 0;
    for (int k = 0; k < N; k++) e += longint'(p[k]);
    checks++;
    if (longint'(sum) != e) begin
      failures++;
      $display("sum=%0d exp %0d", sum, e);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) p[k] = {1'b0, {(IN_W-1){1'b1}}};
    check_now();
    for (int k = 0; k < N; k++) p[k] = {1'b1, {(IN_W-1){1'b0}}};
    check_now();
    for (int r = 0; r < 2000; r++) begin
      for (int k = 0; k < N; k++) p[k] = IN_W'($urandom);
      check_now();
    end
    // one term at a time, to see every input reaches the sum
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < N; k++) p[k] = (k == i) ? IN_W'(1 << (i + 3)) : '0;
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
