// Environment of a four-phase controller with a left push channel (r, a)
// and a right push channel (R, A), for testbenches.
//
// The left side is an active sender issuing CYCLES requests, the right side a
// passive receiver; each move waits a random 1..5 ns. The module checks the
// four-phase rules on the left (a+ only while r=1, a- only while r=0) and
// that every left cycle causes exactly one right cycle, and reports the
// number of completed cycles and a failure count.
`timescale 1ns/1ps
module hs_env #(
  parameter int CYCLES = 100
) (
  input  logic rst,
  output logic r,
  output logic A,
  input  logic a,
  input  logic R,
  output int   n_left,
  output int   n_right,
  output int   n_checks,
  output int   n_fail,
  output logic done
);
  int n_rplus;

  initial begin
    n_left = 0; n_right = 0; n_checks = 0; n_fail = 0; n_rplus = 0;
    done = 1'b0;
  end

  initial begin
    A = 1'b0;
    forever begin
      @(R);
      #($urandom_range(5, 1));
      A = R;
    end
  end

  always @(posedge a) if (!rst) begin
    n_checks++;
    if (!r) begin n_fail++; $display("FAIL %m %0t: a+ while r=0", $time); end
  end
  always @(negedge a) if (!rst) begin
    n_left++;
    n_checks++;
    if (r || n_right != n_left) begin
      n_fail++; $display("FAIL %m %0t: a- out of order", $time);
    end
  end
  always @(posedge R) if (!rst) begin
    n_right++;
    n_checks++;
    if (n_right != n_rplus) begin n_fail++; $display("FAIL %m %0t: extra R+", $time); end
  end

  initial begin
    r = 1'b0;
    wait (rst == 1'b1);
    wait (rst == 1'b0);
    repeat (CYCLES) begin
      #($urandom_range(5, 1));
      r = 1'b1; n_rplus++;
      wait (a == 1'b1);
      #($urandom_range(5, 1));
      r = 1'b0;
      wait (a == 1'b0);
    end
    wait (R == 1'b0 && A == 1'b0);
    #1 done = 1'b1;
  end
endmodule
