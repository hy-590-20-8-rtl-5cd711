// End-to-end testbench of petrify_examples at its default parameters.
//
// Every circuit of the collection runs at the same time, each with its own
// environment:
//   filter   N_FLT random words; each output checked against
//            (IN[k] + IN[k-1]) / 2, IN[-1] = 0
//   abmux    K_MUX control tokens with random selects; each output word
//            predicted from the select and input sequences
//   drmux    the same with dual-rail control
//   four-phase controllers (complex-gate, generalized-C, serial, decoupled)
//            N_HS handshakes each through hs_env
//   latch stage N_LAT words, the input scrambled right after Ain+
// Mechanisms counted, each of which must occur at least once: both inputs
// selected in each multiplexer, an input kept waiting by a multiplexer, the
// filter's y register holding a previous word different from the current
// one, the latch stage holding its word while its input has already changed,
// and full cycles on every controller.
`timescale 1ns/1ps
module tb_petrify_examples;
  localparam int W     = 8;
  localparam int N_FLT = 100;
  localparam int K_MUX = 100;
  localparam int N_HS  = 100;
  localparam int N_LAT = 100;

  logic rst;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- DUT
  logic flt_Rin, flt_Ain, flt_Rout, flt_Aout;
  logic [W-1:0] flt_IN, flt_OUT;
  logic abm_In0Req, abm_In0Ack, abm_In1Req, abm_In1Ack, abm_Ctl1Req, abm_Ctl1Ack,
        abm_Ctl1, abm_OutReq, abm_OutAck;
  logic [W-1:0] abm_In0Data, abm_In1Data, abm_OutData;
  logic drm_x_req, drm_x_ack, drm_y_req, drm_y_ack, drm_ctl_f, drm_ctl_t,
        drm_ctl_ack, drm_z_req, drm_z_ack;
  logic [W-1:0] drm_x, drm_y, drm_z;
  logic cg_r, cg_a, cg_R, cg_A, gc_r, gc_a, gc_R, gc_A;
  logic ser_r, ser_a, ser_R, ser_A, dec_r, dec_a, dec_R, dec_A;
  logic lat_Rin, lat_Ain, lat_Rout, lat_Aout, lat_Lt;
  logic [W-1:0] lat_din, lat_dout;

  petrify_examples dut (.*);

  // ------------------------------------------------- four-phase controllers
  int hs_left [4], hs_right [4], hs_checks [4], hs_fail [4];
  logic hs_done [4];
  hs_env #(.CYCLES(N_HS)) e_cg  (.rst(rst), .r(cg_r),  .A(cg_A),  .a(cg_a),  .R(cg_R),
    .n_left(hs_left[0]), .n_right(hs_right[0]), .n_checks(hs_checks[0]), .n_fail(hs_fail[0]), .done(hs_done[0]));
  hs_env #(.CYCLES(N_HS)) e_gc  (.rst(rst), .r(gc_r),  .A(gc_A),  .a(gc_a),  .R(gc_R),
    .n_left(hs_left[1]), .n_right(hs_right[1]), .n_checks(hs_checks[1]), .n_fail(hs_fail[1]), .done(hs_done[1]));
  hs_env #(.CYCLES(N_HS)) e_ser (.rst(rst), .r(ser_r), .A(ser_A), .a(ser_a), .R(ser_R),
    .n_left(hs_left[2]), .n_right(hs_right[2]), .n_checks(hs_checks[2]), .n_fail(hs_fail[2]), .done(hs_done[2]));
  hs_env #(.CYCLES(N_HS)) e_dec (.rst(rst), .r(dec_r), .A(dec_A), .a(dec_a), .R(dec_R),
    .n_left(hs_left[3]), .n_right(hs_right[3]), .n_checks(hs_checks[3]), .n_fail(hs_fail[3]), .done(hs_done[3]));

  // ------------------------------------------------------------- filter
  int flt_sent [N_FLT];
  int flt_recv = 0, flt_y_differs = 0;
  logic flt_done = 1'b0;

  function automatic int flt_expected(input int k);
    int prev = (k == 0) ? 0 : flt_sent[k-1];
    return (flt_sent[k] + prev) / 2;
  endfunction

  initial begin
    flt_Rin = 1'b0; flt_IN = '0;
    #11;
    for (int i = 0; i < N_FLT; i++) begin
      flt_sent[i] = int'($urandom_range(255));
      flt_IN = W'(flt_sent[i]);
      #($urandom_range(4, 1));
      flt_Rin = 1'b1;
      wait (flt_Ain == 1'b1);
      flt_IN = W'($urandom);
      #($urandom_range(4, 1));
      flt_Rin = 1'b0;
      wait (flt_Ain == 1'b0);
    end
  end

  initial begin
    flt_Aout = 1'b0;
    #11;
    while (flt_recv < N_FLT) begin
      wait (flt_Rout == 1'b1);
      #0.1;
      check(int'(flt_OUT) == flt_expected(flt_recv),
            $sformatf("filter word %0d: %0d, expected %0d", flt_recv, flt_OUT, flt_expected(flt_recv)));
      if (flt_recv > 0 && flt_sent[flt_recv-1] != flt_sent[flt_recv]) flt_y_differs++;
      flt_recv++;
      #($urandom_range(5, 1));
      flt_Aout = 1'b1;
      wait (flt_Rout == 1'b0);
      #($urandom_range(5, 1));
      flt_Aout = 1'b0;
    end
    flt_done = 1'b1;
  end

  // ------------------------------------------- all-bundled multiplexer
  logic [W-1:0] abm_w0 [K_MUX+1], abm_w1 [K_MUX+1];
  bit abm_sel [K_MUX];
  int abm_out = 0, abm_r0 = 0, abm_r1 = 0, abm_wait = 0;
  logic abm_done = 1'b0;

  initial begin
    abm_In0Req = 1'b0; abm_In0Data = '0;
    #11;
    for (int i = 0; i <= K_MUX; i++) begin
      abm_In0Data = abm_w0[i];
      #($urandom_range(6, 1));
      abm_In0Req = 1'b1;
      wait (abm_In0Ack == 1'b1);
      abm_In0Data = W'($urandom);
      #($urandom_range(3, 1));
      abm_In0Req = 1'b0;
      wait (abm_In0Ack == 1'b0);
    end
  end
  initial begin
    abm_In1Req = 1'b0; abm_In1Data = '0;
    #11;
    for (int i = 0; i <= K_MUX; i++) begin
      abm_In1Data = abm_w1[i];
      #($urandom_range(6, 1));
      abm_In1Req = 1'b1;
      wait (abm_In1Ack == 1'b1);
      abm_In1Data = W'($urandom);
      #($urandom_range(3, 1));
      abm_In1Req = 1'b0;
      wait (abm_In1Ack == 1'b0);
    end
  end
  initial begin
    abm_Ctl1Req = 1'b0; abm_Ctl1 = 1'b0;
    #11;
    for (int k = 0; k < K_MUX; k++) begin
      abm_Ctl1 = abm_sel[k];
      #($urandom_range(6, 1));
      abm_Ctl1Req = 1'b1;
      wait (abm_Ctl1Ack == 1'b1);
      #($urandom_range(3, 1));
      abm_Ctl1Req = 1'b0;
      wait (abm_Ctl1Ack == 1'b0);
    end
  end
  initial begin
    logic [W-1:0] e;
    abm_OutAck = 1'b0;
    #11;
    while (abm_out < K_MUX) begin
      wait (abm_OutReq == 1'b1);
      #0.1;
      e = abm_sel[abm_out] ? abm_w1[abm_r1] : abm_w0[abm_r0];
      if (abm_sel[abm_out]) begin abm_r1++; if (abm_In0Req) abm_wait++; end
      else                  begin abm_r0++; if (abm_In1Req) abm_wait++; end
      check(abm_OutData == e, $sformatf("abmux token %0d: %0h, expected %0h", abm_out, abm_OutData, e));
      abm_out++;
      #($urandom_range(5, 1));
      abm_OutAck = 1'b1;
      wait (abm_OutReq == 1'b0);
      #($urandom_range(5, 1));
      abm_OutAck = 1'b0;
    end
    wait (abm_Ctl1Ack == 1'b0);
    abm_done = 1'b1;
  end

  // ------------------------------------- dual-rail-control multiplexer
  logic [W-1:0] drm_w0 [K_MUX+1], drm_w1 [K_MUX+1];
  bit drm_sel [K_MUX];
  int drm_out = 0, drm_r0 = 0, drm_r1 = 0, drm_wait = 0;
  logic drm_done = 1'b0;

  initial begin
    drm_x_req = 1'b0; drm_x = '0;
    #11;
    for (int i = 0; i <= K_MUX; i++) begin
      drm_x = drm_w0[i];
      #($urandom_range(6, 1));
      drm_x_req = 1'b1;
      wait (drm_x_ack == 1'b1);
      drm_x = W'($urandom);
      #($urandom_range(3, 1));
      drm_x_req = 1'b0;
      wait (drm_x_ack == 1'b0);
    end
  end
  initial begin
    drm_y_req = 1'b0; drm_y = '0;
    #11;
    for (int i = 0; i <= K_MUX; i++) begin
      drm_y = drm_w1[i];
      #($urandom_range(6, 1));
      drm_y_req = 1'b1;
      wait (drm_y_ack == 1'b1);
      drm_y = W'($urandom);
      #($urandom_range(3, 1));
      drm_y_req = 1'b0;
      wait (drm_y_ack == 1'b0);
    end
  end
  initial begin
    drm_ctl_f = 1'b0; drm_ctl_t = 1'b0;
    #11;
    for (int k = 0; k < K_MUX; k++) begin
      #($urandom_range(6, 1));
      if (drm_sel[k]) drm_ctl_t = 1'b1;
      else            drm_ctl_f = 1'b1;
      wait (drm_ctl_ack == 1'b1);
      #($urandom_range(3, 1));
      drm_ctl_t = 1'b0; drm_ctl_f = 1'b0;
      wait (drm_ctl_ack == 1'b0);
    end
  end
  initial begin
    logic [W-1:0] e;
    drm_z_ack = 1'b0;
    #11;
    while (drm_out < K_MUX) begin
      wait (drm_z_req == 1'b1);
      #0.1;
      e = drm_sel[drm_out] ? drm_w1[drm_r1] : drm_w0[drm_r0];
      if (drm_sel[drm_out]) begin drm_r1++; if (drm_x_req) drm_wait++; end
      else                  begin drm_r0++; if (drm_y_req) drm_wait++; end
      check(drm_z == e, $sformatf("drmux token %0d: %0h, expected %0h", drm_out, drm_z, e));
      drm_out++;
      #($urandom_range(5, 1));
      drm_z_ack = 1'b1;
      wait (drm_z_req == 1'b0);
      #($urandom_range(5, 1));
      drm_z_ack = 1'b0;
    end
    drm_done = 1'b1;
  end

  // ---------------------------------------------------- latch stage
  logic [W-1:0] lat_sent [N_LAT];
  int lat_recv = 0, lat_held = 0;
  logic lat_done = 1'b0;

  initial begin
    lat_Rin = 1'b0; lat_din = '0;
    #11;
    for (int i = 0; i < N_LAT; i++) begin
      lat_sent[i] = W'($urandom);
      lat_din = lat_sent[i];
      #($urandom_range(4, 1));
      lat_Rin = 1'b1;
      wait (lat_Ain == 1'b1);
      lat_din = ~lat_sent[i];
      #($urandom_range(4, 1));
      lat_Rin = 1'b0;
      wait (lat_Ain == 1'b0);
    end
  end
  initial begin
    lat_Aout = 1'b0;
    #11;
    while (lat_recv < N_LAT) begin
      wait (lat_Rout == 1'b1);
      #($urandom_range(6, 1));
      if (lat_din != lat_sent[lat_recv]) lat_held++;
      check(lat_dout == lat_sent[lat_recv], $sformatf("latch word %0d", lat_recv));
      lat_recv++;
      lat_Aout = 1'b1;
      wait (lat_Rout == 1'b0);
      #($urandom_range(6, 1));
      lat_Aout = 1'b0;
    end
    lat_done = 1'b1;
  end

  // -------------------------------------------------------- control
  initial begin
    for (int i = 0; i <= K_MUX; i++) begin
      abm_w0[i] = W'($urandom); abm_w1[i] = W'($urandom);
      drm_w0[i] = W'($urandom); drm_w1[i] = W'($urandom);
    end
    for (int k = 0; k < K_MUX; k++) begin
      abm_sel[k] = 1'($urandom);
      drm_sel[k] = 1'($urandom);
    end
    rst = 1'b1;
    #10 rst = 1'b0;
    wait (flt_done && abm_done && drm_done && lat_done &&
          hs_done[0] && hs_done[1] && hs_done[2] && hs_done[3]);
    #10;
    for (int i = 0; i < 4; i++) begin
      checks   += hs_checks[i];
      failures += hs_fail[i];
      check(hs_left[i] == N_HS && hs_right[i] == N_HS,
            $sformatf("controller %0d: %0d/%0d cycles", i, hs_left[i], hs_right[i]));
    end
    check(abm_r0 > 0 && abm_r1 > 0, "abmux: an input was never selected");
    check(drm_r0 > 0 && drm_r1 > 0, "drmux: an input was never selected");
    check(abm_wait > 0, "abmux: no input was ever kept waiting");
    check(drm_wait > 0, "drmux: no input was ever kept waiting");
    check(flt_y_differs > 0, "filter: previous word never differed");
    check(lat_held > 0, "latch stage never held a word against a changed input");
    $display("filter %0d words; abmux %0d/%0d (waits %0d); drmux %0d/%0d (waits %0d); latch held %0d; controllers %0d %0d %0d %0d",
             flt_recv, abm_r0, abm_r1, abm_wait, drm_r0, drm_r1, drm_wait, lat_held,
             hs_left[0], hs_left[1], hs_left[2], hs_left[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
