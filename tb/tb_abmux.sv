// Self-checking testbench for the all-bundled multiplexer.
//
// Two independent senders push random words on In0 and In1 (and scramble
// their data as soon as they are acknowledged); a control sender issues K
// tokens with a random select bit Ctl1 (changed only between tokens); a
// receiver on Out acknowledges after random delays. The receiver predicts
// each output word from the select sequence and the two input sequences:
// token k with Ctl1 = s must deliver the next unread word of input s. Also
// checked: only the selected input is acknowledged, the word stays valid up
// to OutAck+, and K words arrive. The test counts how often each input was
// chosen and how often the other input was kept waiting; each must happen.
`timescale 1ns/1ps
module tb_abmux;
  localparam int W = 8;
  localparam int K = 300;
  logic rst;
  logic In0Req, In0Ack, In1Req, In1Ack, Ctl1Req, Ctl1Ack, Ctl1, OutReq, OutAck;
  logic [W-1:0] In0Data, In1Data, OutData;
  logic [W-1:0] w0 [K+1], w1 [K+1];
  bit sel [K];
  int checks = 0, failures = 0;
  int n_out = 0, r0 = 0, r1 = 0, n_sel0 = 0, n_sel1 = 0, n_wait = 0;

  abmux #(.W(W)) dut (
    .rst(rst), .In0Req(In0Req), .In0Ack(In0Ack), .In0Data(In0Data),
    .In1Req(In1Req), .In1Ack(In1Ack), .In1Data(In1Data),
    .Ctl1Req(Ctl1Req), .Ctl1Ack(Ctl1Ack), .Ctl1(Ctl1),
    .OutReq(OutReq), .OutAck(OutAck), .OutData(OutData));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    for (int i = 0; i <= K; i++) begin
      w0[i] = W'($urandom);
      w1[i] = W'($urandom);
    end
    for (int i = 0; i < K; i++) sel[i] = 1'($urandom);
    rst = 1'b1;
    #10 rst = 1'b0;
  end

  // Input 0 sender.
  initial begin
    In0Req = 1'b0; In0Data = '0;
    #11;
    for (int i = 0; i <= K; i++) begin
      In0Data = w0[i];
      #($urandom_range(6, 1));
      In0Req = 1'b1;
      wait (In0Ack == 1'b1);
      In0Data = W'($urandom);
      #($urandom_range(3, 1));
      In0Req = 1'b0;
      wait (In0Ack == 1'b0);
    end
  end

  // Input 1 sender.
  initial begin
    In1Req = 1'b0; In1Data = '0;
    #11;
    for (int i = 0; i <= K; i++) begin
      In1Data = w1[i];
      #($urandom_range(6, 1));
      In1Req = 1'b1;
      wait (In1Ack == 1'b1);
      In1Data = W'($urandom);
      #($urandom_range(3, 1));
      In1Req = 1'b0;
      wait (In1Ack == 1'b0);
    end
  end

  // Control sender.
  initial begin
    Ctl1Req = 1'b0; Ctl1 = 1'b0;
    #11;
    for (int k = 0; k < K; k++) begin
      Ctl1 = sel[k];
      #($urandom_range(6, 1));
      Ctl1Req = 1'b1;
      wait (Ctl1Ack == 1'b1);
      #($urandom_range(3, 1));
      Ctl1Req = 1'b0;
      wait (Ctl1Ack == 1'b0);
      Ctl1 = 1'($urandom);     // free to change between tokens
    end
  end

  always @(posedge In0Ack) if (!rst) check(n_out > 0 && !sel[n_out-1], "In0 acknowledged but not selected");
  always @(posedge In1Ack) if (!rst) check(n_out > 0 &&  sel[n_out-1], "In1 acknowledged but not selected");

  // Receiver.
  initial begin
    logic [W-1:0] exp_w;
    OutAck = 1'b0;
    #11;
    forever begin
      wait (OutReq == 1'b1);
      #0.1;
      exp_w = sel[n_out] ? w1[r1] : w0[r0];
      if (sel[n_out]) begin n_sel1++; r1++; if (In0Req) n_wait++; end
      else            begin n_sel0++; r0++; if (In1Req) n_wait++; end
      check(OutData == exp_w, $sformatf("token %0d: OutData=%0h expected %0h", n_out, OutData, exp_w));
      #($urandom_range(5, 1));
      check(OutData == exp_w, "OutData changed before OutAck+");
      n_out++;
      OutAck = 1'b1;
      wait (OutReq == 1'b0);
      #($urandom_range(5, 1));
      OutAck = 1'b0;
    end
  end

  initial begin
    wait (n_out == K);
    wait (OutReq == 1'b0 && OutAck == 1'b0 && Ctl1Ack == 1'b0);
    #5;
    check(n_out == K, "token count");
    check(n_sel0 > 0, "input 0 never selected");
    check(n_sel1 > 0, "input 1 never selected");
    check(n_wait > 0, "no input was ever kept waiting");
    $display("tokens %0d: in0 %0d, in1 %0d, other input waiting %0d", n_out, n_sel0, n_sel1, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(K * 100 + 1000);
    failures++;
    $display("FAIL watchdog: multiplexer stopped after %0d tokens", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
