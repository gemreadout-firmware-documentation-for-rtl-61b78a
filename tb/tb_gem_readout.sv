// tb_gem_readout: end-to-end test of the GEM readout firmware at its
// default sizes (twelve channels, 1024-word DataFIFOs, 64-entry SizeFIFOs).
//
// The debug transmitter's outputs (C[24] DATA, C[25] DATA_VALID) are looped
// back to the DATA/DATA_VALID inputs of all twelve receive channels on port
// A, so the design receives its own VFAT-like frames. LCLK runs at 40 MHz,
// MCLK on G0 at 10 MHz (the no-PLL range). The sequence:
//   1. set the trigger words to 0x26 and send two soft triggers
//      (T1 must carry CalPulse "110" twice);
//   2. load the twelve TX words, check all FIFOs empty;
//   3. start 64 frames one after another; every channel must then hold
//      64 events of 14 words (896 words; the 6-bit SizeFIFO count of a full
//      64-entry FIFO reads 0) and count 64 events;
//   4. a 65th frame must be dropped (SizeFIFO full) but still counted;
//   5. read all events back through the registers and compare every word
//      with the TX words (12 words, then 2 zero words); FIFOs end empty;
//   6. hard trigger on G1 (T1 "100") that also starts a frame through
//      TX_EXT_EN; one calibration sequence from a register write; external
//      calibration on G1 (no hard trigger, no frame);
//   7. a reset through the reset register clears the counters.
// Each mechanism is counted and a failure is counted for one that never
// happened. The T1 line is decoded from C[0] on MCLK rising edges.
`timescale 1ns/1ps
module tb_gem_readout;
  import gem_pkg::*;
  int checks = 0, failures = 0;

  logic lclk = 0, mclk = 0;
  always #12.5 lclk = ~lclk;
  always #50   mclk = ~mclk;

  logic        nlbres = 1, wren = 0, rden = 0, usr = 1, g1 = 0;
  logic [15:0] addr = 0, din = 0, dout;
  logic [31:0] a, c, e;
  logic [1:0]  gout;
  logic [11:0] spare_out, spare_dir;
  logic        selg, noeg, seld, noed, sele, noee, self_, noef, red, green;

  always_comb begin
    a = '0;
    for (int k = 0; k < N_CH; k++) begin
      a[2*k]   = c[24];
      a[2*k+1] = c[25];
    end
  end

  gem_readout dut (
    .nLBRES(nlbres), .LCLK(lclk), .REG_WREN(wren), .REG_RDEN(rden), .REG_ADDR(addr),
    .REG_DIN(din), .REG_DOUT(dout), .USR_ACCESS(usr), .A(a), .B('0), .C(c),
    .SELG(selg), .nOEG(noeg), .GOUT(gout), .GIN({g1, mclk}),
    .IDD(3'd0), .SELD(seld), .nOED(noed), .D('0),
    .IDE(3'd0), .SELE(sele), .nOEE(noee), .E(e),
    .IDF(3'd0), .SELF(self_), .nOEF(noef), .F('0),
    .SPARE_OUT(spare_out), .SPARE_IN('0), .SPARE_DIR(spare_dir),
    .RED_PULSE(red), .GREEN_PULSE(green));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_lv1a = 0, n_calpulse = 0, n_calseq = 0, n_t1_other = 0;
  int n_frames = 0, n_overflow = 0, n_reg_reset = 0;
  int n_fanout_err = 0;

  // T1 decoder on C[0], sampled where the VFATs sample it.
  logic [7:0] t1_sh;
  int         t1_left = 0;
  always @(posedge mclk) begin
    if (c[11:0] != {12{c[0]}} || c[23:12] != {12{~mclk}}) n_fanout_err++;
    if (t1_left > 0) begin
      t1_sh = {t1_sh[6:0], c[0]};
      t1_left--;
      if (t1_left == 0) begin
        if (t1_sh == T1_CALIB_SEQ) n_calseq++;
        else if (t1_sh == {T1_LV1A, 5'b0}) n_lv1a++;
        else if (t1_sh == {T1_CALPULSE, 5'b0}) n_calpulse++;
        else n_t1_other++;
      end
    end else if (c[0]) begin
      t1_sh   = 8'b1;
      t1_left = 7;
    end
  end

  // Transmitted frames (falling edge of the loop-back DATA_VALID).
  logic dv_q = 0;
  always @(posedge mclk) begin
    if (dv_q && !c[25]) n_frames++;
    dv_q <= c[25];
  end

  // ---------------- local-bus accesses ----------------
  task automatic uwrite(input logic [15:0] a_, input logic [15:0] d);
    @(negedge lclk); addr = a_; din = d; wren = 1;
    @(negedge lclk); wren = 0;
    @(negedge lclk);
  endtask

  task automatic uread(input logic [15:0] a_, output logic [15:0] d);
    @(negedge lclk); addr = a_; rden = 1;
    @(negedge lclk); rden = 0; d = dout;
    @(negedge lclk);
  endtask

  task automatic wait_mclk(input int n);
    repeat (n) @(posedge mclk);
  endtask

  // Start one frame and wait until it has been sent and stored.
  task automatic send_frame();
    int f0 = n_frames;
    uwrite(A_GEM_TX_START, 16'h0000);
    while (n_frames == f0) @(posedge mclk);
    wait_mclk(4);
  endtask

  task automatic check_all_channels(input int words, input int events_sent,
                                    input string what);
    logic [15:0] d, h, l;
    bit ok = 1;
    for (int k = 0; k < N_CH; k++) begin
      uread(A_GEM_FIFOSIZE + 16'(2 * k), d);
      if (d[9:0] != 10'(words)) ok = 0;
      if (d[15:10] != 6'(words / 14)) ok = 0;   // 64 entries read as 0
      uread(A_GEM_EVENTS_SENT_H + 16'(2 * k), h);
      uread(A_GEM_EVENTS_SENT_L + 16'(2 * k), l);
      if ({h, l} != 32'(events_sent)) ok = 0;
    end
    check(ok, what);
  endtask

  localparam logic [15:0] TXW [12] = '{16'hA012, 16'hC345, 16'hE678, 16'h9ABC,
                                      16'hDEF0, 16'h1234, 16'h5678, 16'h9ABC,
                                      16'hDEF0, 16'h1234, 16'h5678, 16'h9ABC};

  initial begin
    logic [15:0] d;
    int          n, bad;
    #2 nlbres = 0;
    #200 nlbres = 1;
    wait (!red);
    wait_mclk(4);
    check(selg && noeg && spare_dir == '1 && e == '0, "unused ports tied off");

    // 1. trigger words and soft triggers
    uwrite(A_GEM_TRIG_WORD, 16'h0026);
    uwrite(A_GEM_SOFT_TRIG, 16'h0000);
    wait_mclk(20);
    uwrite(A_GEM_SOFT_TRIG, 16'h0000);
    wait_mclk(20);
    check(n_calpulse == 2, $sformatf("two soft triggers sent CalPulse, saw %0d", n_calpulse));

    // 2. TX words, empty FIFOs
    for (int i = 0; i < 12; i++) uwrite(A_GEM_TX_WORD + 16'(2 * i), TXW[i]);
    check_all_channels(0, 0, "all FIFOs empty before the run");

    // 3. 64 events
    for (int ev = 0; ev < 64; ev++) send_frame();
    repeat (8) @(posedge lclk);
    check(n_frames == 64, "64 frames sent");
    check_all_channels(64 * 14, 64, "64 events of 14 words in every channel");

    // 4. overflow: 65th frame dropped but counted
    send_frame();
    repeat (8) @(posedge lclk);
    check_all_channels(64 * 14, 65, "65th event dropped with SizeFIFO full, still counted");
    n_overflow++;

    // 5. read out every event of every channel
    bad = 0;
    for (int k = 0; k < N_CH; k++) begin
      for (int ev = 0; ev < 64; ev++) begin
        uread(A_GEM_EVENTSIZE + 16'(2 * k), d);
        if (d != 16'd14) bad++;
        n = int'(d);
        for (int w = 0; w < n; w++) begin
          uread(A_GEM_EVENTDATA + 16'(256 * k), d);
          if (d != (w < 12 ? TXW[w] : 16'h0000)) bad++;
        end
      end
    end
    check(bad == 0, $sformatf("all 12 x 64 events read back intact (%0d errors)", bad));
    repeat (8) @(posedge lclk);
    check_all_channels(0, 65, "all FIFOs empty after readout");

    // 6a. hard trigger on G1 with TX_EXT_EN: LV1A and one frame
    uwrite(A_GEM_TX_START, 16'h0001);   // also starts one frame
    wait_mclk(240);
    n = n_frames;
    @(negedge mclk) g1 = 1; wait_mclk(4); @(negedge mclk) g1 = 0;
    wait_mclk(240);
    check(n_lv1a == 1, "hard trigger sent LV1A");
    check(n_frames == n + 1, "hard trigger started a frame with TX_EXT_EN");
    // 6b. one calibration sequence
    uwrite(A_GEM_CALIB_START, 16'h0001);
    wait_mclk(20);
    check(n_calseq == 1, "calibration write sent one sequence");
    // 6c. external calibration: G1 gives the sequence, no LV1A, no frame
    uwrite(A_GEM_CALIB_START, 16'hFFFF);
    wait_mclk(4);
    n = n_frames;
    @(negedge mclk) g1 = 1; wait_mclk(4); @(negedge mclk) g1 = 0;
    wait_mclk(240);
    check(n_calseq == 2 && n_lv1a == 1 && n_frames == n,
          "external calibration on G1 replaces the hard trigger");
    uwrite(A_GEM_CALIB_START, 16'h0000);   // leaves external mode, one more sequence
    wait_mclk(20);
    check(n_calseq == 3, "leaving external mode sends one sequence");

    // 7. reset through the register
    check_all_channels(2 * 14, 67, "two more events stored before the reset");
    uwrite(A_RESET, 16'h0001);
    n_reg_reset++;
    repeat (10) @(posedge lclk);
    check_all_channels(0, 0, "register reset clears FIFOs and counters");

    // mechanisms
    check(n_fanout_err == 0, "T1 and MCLK fanned out to all VFAT outputs");
    check(n_t1_other == 0, "no malformed T1 commands");
    check(n_calpulse > 0, $sformatf("mechanism soft trigger: %0d", n_calpulse));
    check(n_lv1a > 0, $sformatf("mechanism hard trigger: %0d", n_lv1a));
    check(n_calseq > 0, $sformatf("mechanism calibration sequence: %0d", n_calseq));
    check(n_frames > 0, $sformatf("mechanism TX frame: %0d", n_frames));
    check(n_overflow > 0, $sformatf("mechanism FIFO overflow: %0d", n_overflow));
    check(n_reg_reset > 0, $sformatf("mechanism register reset: %0d", n_reg_reset));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
