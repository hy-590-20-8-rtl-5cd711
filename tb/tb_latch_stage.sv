// Self-checking testbench for latch_stage.
//
// A sender pushes N random words (Rin/Ain/din, four-phase bundled data) and
// replaces din by a different random value as soon as Ain+ is seen, which
// the protocol allows. A receiver acknowledges after a random delay and
// samples dout twice, at Rout+ and again just before its Aout+: both samples
// must equal the word that was sent, which shows that the latch closed (Lt+)
// before the input was acknowledged. It also checks that Lt and Ain equal
// Rout, that the latch is transparent (dout follows din) while Lt = 0, and
// that N words arrive in order.
`timescale 1ns/1ps
module tb_latch_stage;
  localparam int W = 8;
  localparam int N = 200;
  logic rst, Rin, Ain, Rout, Aout, Lt;
  logic [W-1:0] din, dout;
  logic [W-1:0] sent [N];
  int checks = 0, failures = 0, n_recv = 0;

  latch_stage #(.W(W)) dut (.rst(rst), .Rin(Rin), .Ain(Ain), .din(din),
                            .Rout(Rout), .Aout(Aout), .dout(dout), .Lt(Lt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Sender.
  initial begin
    rst = 1'b1; Rin = 1'b0; din = '0;
    #10 rst = 1'b0;
    for (int i = 0; i < N; i++) begin
      sent[i] = W'($urandom);
      din = sent[i];
      #($urandom_range(4, 1));
      if (!Lt) begin
        #0.1 check(dout == din, "latch not transparent while Lt=0");
      end
      Rin = 1'b1;
      wait (Ain == 1'b1);
      din = ~sent[i];           // the input may change once acknowledged
      #($urandom_range(4, 1));
      Rin = 1'b0;
      wait (Ain == 1'b0);
    end
  end

  // Receiver.
  initial begin
    Aout = 1'b0;
    forever begin
      wait (Rout == 1'b1);
      #0.1;
      check(Lt == 1'b1 && Ain == 1'b1, "Lt/Ain do not follow Rout");
      check(dout == sent[n_recv], $sformatf("word %0d wrong at Rout+", n_recv));
      #($urandom_range(6, 1));
      check(dout == sent[n_recv], $sformatf("word %0d not held by latch", n_recv));
      n_recv++;
      Aout = 1'b1;
      wait (Rout == 1'b0);
      #($urandom_range(6, 1));
      Aout = 1'b0;
    end
  end

  initial begin
    wait (n_recv == N);
    wait (Rout == 1'b0 && Aout == 1'b0);
    check(n_recv == N, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N * 40 + 1000);
    failures++;
    $display("FAIL watchdog: stage stopped after %0d words", n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
