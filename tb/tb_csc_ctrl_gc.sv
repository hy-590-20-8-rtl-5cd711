// Self-checking testbench for csc_ctrl_gc.
//
// The left environment is an active four-phase sender (r+ when a=0, r- when
// a=1), the right one a passive receiver (A follows R); both wait a random
// 1..5 ns before each move. The checks follow the handshake rules and the
// one-to-one pairing of cycles: a rises only while r=1 and falls only while
// r=0; every left cycle produces exactly one right cycle (R+ once per r+);
// a- only after the right request of the same cycle was issued.
// The controller lets the two sides overlap; the test counts the cycles in
// which the left side was acknowledged (a+) before the right side was (A+),
// and those in which a new left request came while the right side was still
// returning to zero. Both must happen.
`timescale 1ns/1ps
module tb_csc_ctrl_gc;
  localparam int CYCLES = 200;
  logic rst, r, A, a, R;
  int checks = 0, failures = 0;
  int n_rplus = 0, n_Rplus = 0, n_aminus = 0, n_Aplus = 0;
  int n_ack_early = 0, n_overlap = 0;

  csc_ctrl_gc dut (.rst(rst), .r(r), .A(A), .a(a), .R(R));

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

  always @(posedge a) if (!rst) begin
    check(r == 1'b1, "a+ while r=0");
    if (n_Aplus < n_rplus) n_ack_early++;
  end
  always @(posedge A) if (!rst) n_Aplus++;
  always @(posedge r) if (!rst && (R || A)) n_overlap++;
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
    check(n_ack_early > 0, "left never acknowledged ahead of the right side");
    check(n_overlap > 0, "return-to-zero phases never overlapped");
    $display("a+ before A+: %0d cycles; r+ during right return-to-zero: %0d", n_ack_early, n_overlap);
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
