// Self-checking testbench for c_hs_ctrl.
//
// The left environment is an active four-phase sender (r+ when a=0, r- when
// a=1), the right one a passive receiver (A follows R); both wait a random
// 1..5 ns before each move. The checks follow the handshake rules and the
// one-to-one pairing of cycles: a rises only while r=1 and falls only while
// r=0; every left cycle produces exactly one right cycle (R+ once per r+);
// a- only after the right request of the same cycle was issued; a always
// equals R, which rises only while r=1, A=0 and falls only while r=0, A=1.
`timescale 1ns/1ps
module tb_c_hs_ctrl;
  localparam int CYCLES = 200;
  logic rst, r, A, a, R;
  int checks = 0, failures = 0;
  int n_rplus = 0, n_Rplus = 0, n_aminus = 0;

  c_hs_ctrl dut (.rst(rst), .r(r), .A(A), .a(a), .R(R));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Right environment: passive receiver.
  initial begin
    A = 1'b0;
    forever begin
      @(R);
      #($urandom_range(5, 1));
      A = R;
    end
  end

  always @(posedge a) if (!rst) check(r == 1'b1, "a+ while r=0");
  always @(R or a) if (!rst) begin
    #0.01 check(a == R, "a differs from R");
  end
  always @(posedge R) if (!rst) check(r && !A, "R+ without r=1, A=0");
  always @(negedge R) if (!rst) check(!r && A, "R- without r=0, A=1");
  always @(negedge a) if (!rst) begin
    n_aminus++;
    check(r == 1'b0, "a- while r=1");
    check(n_Rplus == n_aminus, "a- before R+ of the same cycle");
  end
  always @(posedge R) if (!rst) begin
    n_Rplus++;
    check(n_Rplus == n_rplus, "R+ count differs from r+ count");
  end

  initial begin
    rst = 1'b1; r = 1'b0;
    #10 rst = 1'b0;
    repeat (CYCLES) begin
      #($urandom_range(5, 1));
      r = 1'b1; n_rplus++;
      wait (a == 1'b1);
      #($urandom_range(5, 1));
      r = 1'b0;
      wait (a == 1'b0);
    end
    wait (R == 1'b0 && A == 1'b0);
    #1;
    check(n_aminus == CYCLES, "left cycles completed");
    check(n_Rplus == CYCLES, "right cycles completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(CYCLES * 100 + 1000);
    failures++;
    $display("FAIL watchdog: controller stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
