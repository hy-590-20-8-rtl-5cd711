// Self-checking testbench for hs_latch: reset clears the word; while R = 1
// the output follows the input and A = 1; while R = 0 the output keeps the
// last value seen with R = 1 whatever the input does and A = 0.
`timescale 1ns/1ps
module tb_hs_latch;
  localparam int W = 8;
  logic rst, R, A;
  logic [W-1:0] d, q, held;
  int checks = 0, failures = 0;

  hs_latch #(.W(W)) dut (.rst(rst), .R(R), .A(A), .d(d), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    rst = 1'b1; R = 1'b0; d = 8'hA5;
    #1 check(q == '0, "reset value");
    rst = 1'b0;
    held = '0;
    for (int i = 0; i < 300; i++) begin
      R = 1'($urandom);
      d = W'($urandom);
      #1;
      if (R) held = d;
      check(q == held, "latch output");
      check(A == R, "acknowledge");
    end
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
