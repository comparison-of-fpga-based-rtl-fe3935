// tb_coef_mult: self-checking test of the shift-and-add constant multiplier.
// Three instances hold the three distinct filter coefficients (4, 16, 114);
// random and corner-case signed samples are applied and each product is
// compared with the integer product x * COEF worked out in the testbench.
module tb_coef_mult;
  localparam int DATA_W = 16;
  localparam int COEF_W = 8;
  localparam int PW = DATA_W + COEF_W;

  logic clk = 0;
  int   cycles = 0;
  int   checks = 0, failures = 0;

  logic signed [DATA_W-1:0] x;
  logic signed [PW-1:0]     p4, p16, p114;

  coef_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF(8'd4))   u4   (.x, .p(p4));
  coef_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF(8'd16))  u16  (.x, .p(p16));
  coef_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF(8'd114)) u114 (.x, .p(p114));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic signed [DATA_W-1:0] v);
    longint e4, e16, e114;
    x = v;
    #1;
    e4 = longint'(v) * 4; e16 = longint'(v) * 16; e114 = longint'(v) * 114;
    checks += 3;
    if (longint'(p4) != e4)     begin failures++; $display("x=%0d p4=%0d exp %0d", v, p4, e4); end
    if (longint'(p16) != e16)   begin failures++; $display("x=%0d p16=%0d exp %0d", v, p16, e16); end
    if (longint'(p114) != e114) begin failures++; $display("x=%0d p114=%0d exp %0d", v, p114, e114); end
  endtask

  initial begin
    check_one(16'sh0100);
    check_one(16'sh0000);
    check_one(16'sh7fff);
    check_one(-16'sh8000);
    check_one(-16'sh0001);
    for (int i = 0; i < 2000; i++) check_one(DATA_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
