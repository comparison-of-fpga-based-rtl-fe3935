// tb_decoder_3to8: self-checking test of the 3:8 decoder. Every address is
// applied (several times, in random order too) and the output must have
// exactly the line of that address set.
module tb_decoder_3to8;
  logic clk = 0;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic [2:0] a;
  logic [7:0] d;

  decoder_3to8 dut (.a, .d);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [2:0] v);
    a = v;
    #1;
    checks++;
    if (d != (8'b1 << v) || $countones(d) != 1) begin
      failures++;
      $display("a=%0d d=%b", v, d);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) check_one(3'(i));
    for (int i = 0; i < 100; i++) check_one(3'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
