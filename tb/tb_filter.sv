// Self-checking testbench for the averaging filter.
//
// A sender pushes N random words through (Rin, Ain, IN) and scrambles IN as
// soon as Ain+ is seen; a receiver captures OUT at Rout+ and checks it
// against (IN[k] + IN[k-1]) / 2, with IN[-1] = 0, worked out here. It also
// checks that the output word is still valid when the receiver acknowledges
// and that exactly N words arrive.
`timescale 1ns/1ps
module tb_filter;
  localparam int W = 8;
  localparam int N = 300;
  logic rst, Rin, Ain, Rout, Aout;
  logic [W-1:0] IN, OUT;
  int sent [N];
  int checks = 0, failures = 0, n_recv = 0;

  filter #(.W(W)) dut (.rst(rst), .Rin(Rin), .Ain(Ain), .IN(IN),
                       .Rout(Rout), .Aout(Aout), .OUT(OUT));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic int expected(input int k);
    int prev = (k == 0) ? 0 : sent[k-1];
    return (sent[k] + prev) / 2;
  endfunction

  initial begin
    rst = 1'b1; Rin = 1'b0; IN = '0;
    #10 rst = 1'b0;
    for (int i = 0; i < N; i++) begin
      sent[i] = (i < 3) ? 255 - i : int'($urandom_range(255));
      IN = W'(sent[i]);
      #($urandom_range(4, 1));
      Rin = 1'b1;
      wait (Ain == 1'b1);
      IN = W'($urandom);
      #($urandom_range(4, 1));
      Rin = 1'b0;
      wait (Ain == 1'b0);
    end
  end

  initial begin
    Aout = 1'b0;
    forever begin
      wait (Rout == 1'b1);
      #0.1;
      check(int'(OUT) == expected(n_recv),
            $sformatf("word %0d: OUT=%0d expected %0d", n_recv, OUT, expected(n_recv)));
      #($urandom_range(5, 1));
      check(int'(OUT) == expected(n_recv), "OUT changed before Aout+");
      n_recv++;
      Aout = 1'b1;
      wait (Rout == 1'b0);
      #($urandom_range(5, 1));
      Aout = 1'b0;
    end
  end

  initial begin
    wait (n_recv == N);
    wait (Ain == 1'b0 && Rin == 1'b0);
    #20;
    check(n_recv == N, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N * 100 + 1000);
    failures++;
    $display("FAIL watchdog: filter stopped after %0d words", n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
