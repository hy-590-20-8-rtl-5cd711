// Self-checking testbench for bd_adder: s = floor((a + b) / 2) for random
// and extreme operands, computed here in 32-bit integers, and Aa = Ra.
`timescale 1ns/1ps
module tb_bd_adder;
  localparam int W = 8;
  logic Ra, Aa;
  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  bd_adder #(.W(W)) dut (.Ra(Ra), .Aa(Aa), .a(a), .b(b), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic one(input int x, input int y);
    int expect_s;
    a = W'(x); b = W'(y); Ra = 1'($urandom);
    #1;
    expect_s = (x + y) / 2;
    check(int'(s) == expect_s, $sformatf("%0d+%0d gave %0d", x, y, s));
    check(Aa == Ra, "Aa");
  endtask

  initial begin
    one(0, 0); one(255, 255); one(255, 0); one(1, 0); one(128, 128);
    for (int i = 0; i < 300; i++) one(int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
