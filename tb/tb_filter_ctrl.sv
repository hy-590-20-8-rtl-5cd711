// Self-checking testbench for filter_ctrl.
//
// Environment: an active input sender (Rin), the x and y latches and the
// adder modelled as acknowledges that follow their requests after a random
// delay, and a passive output receiver (Aout follows Rout). Every transition
// of a controller output is checked against the cycle the controller must
// follow:
//   Rx+  only with the input valid (Rin=1) and y closed (Ay=0); Rx- after Ay+
//   Ra+  after Ax+; Ra- after Ax-
//   Rout+ after Aa+, once per input token; Rout- after Aout+
//   Ry+  after the output cycle has returned to zero (Rout=0, Aout=0)
//   Ry-  after Rin- and Aa-
//   Ain+ after x has closed (Rx=0, Ax=0) while y is open; Ain- after Ry-
// and at the end every channel has completed as many cycles as the input.
`timescale 1ns/1ps
module tb_filter_ctrl;
  localparam int N = 200;
  logic rst, Rin, Ain, Rx, Ax, Ry, Ay, Ra, Aa, Rout, Aout;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_x = 0, n_y = 0, n_a = 0, n_ain = 0;

  filter_ctrl dut (.rst(rst), .Rin(Rin), .Ain(Ain), .Rx(Rx), .Ax(Ax), .Ry(Ry),
                   .Ay(Ay), .Ra(Ra), .Aa(Aa), .Rout(Rout), .Aout(Aout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Acknowledges of the latches, the adder and the output receiver.
  initial begin Ax = 1'b0; forever begin @(Rx); #($urandom_range(3, 1)); Ax = Rx; end end
  initial begin Ay = 1'b0; forever begin @(Ry); #($urandom_range(3, 1)); Ay = Ry; end end
  initial begin Aa = 1'b0; forever begin @(Ra); #($urandom_range(5, 1)); Aa = Ra; end end
  initial begin Aout = 1'b0; forever begin @(Rout); #($urandom_range(5, 1)); Aout = Rout; end end

  always @(posedge Rx) if (!rst) begin check(Rin && !Ay, "Rx+ early"); n_x++; end
  always @(negedge Rx) if (!rst) check(Ay, "Rx- before Ay+");
  always @(posedge Ra) if (!rst) begin check(Ax, "Ra+ before Ax+"); n_a++; end
  always @(negedge Ra) if (!rst) check(!Ax, "Ra- before Ax-");
  always @(posedge Rout) if (!rst) begin
    n_out++;
    check(Aa, "Rout+ before Aa+");
    check(n_out == n_in, "Rout+ not once per input token");
  end
  always @(negedge Rout) if (!rst) check(Aout, "Rout- before Aout+");
  always @(posedge Ry) if (!rst) begin
    n_y++;
    check(!Rout && !Aout && n_out == n_in, "Ry+ before the output cycle ended");
  end
  always @(negedge Ry) if (!rst) check(!Rin && !Aa, "Ry- before Rin- and Aa-");
  always @(posedge Ain) if (!rst) begin
    n_ain++;
    check(!Rx && !Ax && Ry && Ay, "Ain+ before x closed / y loaded");
  end
  always @(negedge Ain) if (!rst) check(!Ry, "Ain- before Ry-");

  initial begin
    rst = 1'b1; Rin = 1'b0;
    #10 rst = 1'b0;
    repeat (N) begin
      #($urandom_range(4, 1));
      Rin = 1'b1; n_in++;
      wait (Ain == 1'b1);
      #($urandom_range(4, 1));
      Rin = 1'b0;
      wait (Ain == 1'b0);
    end
    wait (!Ry && !Ay && !Ra && !Aa);
    check(n_out == N && n_x == N && n_y == N && n_a == N && n_ain == N,
          $sformatf("cycle counts out=%0d x=%0d y=%0d a=%0d ain=%0d", n_out, n_x, n_y, n_a, n_ain));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N * 100 + 1000);
    failures++;
    $display("FAIL watchdog: controller stopped after %0d tokens", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
