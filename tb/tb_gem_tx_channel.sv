// tb_gem_tx_channel: self-checking test of the debug transmitter.
//
// Loads twelve random TX words, starts frames by a GEM_TX_START pulse on a
// 25 ns LCLK and by HARD_TRIGGER edges on a 40 ns CLK, and captures DATA on
// every CLK edge with DATA_VALID high. Checked: DATA_VALID is high for
// exactly 224 consecutive cycles; the 224 bits are word 0 .. word 11, MSB
// first, followed by 32 zeros; the start latency is within the toggle
// synchroniser's range; HARD_TRIGGER starts a frame only with TX_EXT_EN;
// a start during a frame is ignored.
`timescale 1ns/1ps
module tb_gem_tx_channel;
  int checks = 0, failures = 0;

  logic lclk = 0, clk = 0;
  always #12.5 lclk = ~lclk;
  always #20   clk  = ~clk;

  logic [15:0] words [12];
  logic        start = 0, reset = 1, ext_en = 0, hard = 0;
  logic        data, dv;

  gem_tx_channel dut (
    .LCLK(lclk), .GEM_TX_WORD(words), .GEM_TX_START(start), .CLK(clk), .RESET(reset),
    .TX_EXT_EN(ext_en), .HARD_TRIGGER(hard), .DATA(data), .DATA_VALID(dv));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Monitor: collect frames.
  int          frames = 0;
  int          vcount = 0;
  logic [223:0] cap;
  logic [223:0] expected;

  always @(posedge clk) begin
    if (dv) begin
      cap    = {cap[222:0], data};
      vcount++;
    end else if (vcount != 0) begin
      check(vcount == 224, $sformatf("DATA_VALID high for %0d cycles, expected 224", vcount));
      check(cap == expected, "frame bits equal TX words 0..11 then 32 zeros");
      frames++;
      vcount = 0;
    end
  end

  task automatic pulse_start();
    @(negedge lclk); start = 1; @(negedge lclk); start = 0;
  endtask


  initial begin
    int t0, lat;
    for (int i = 0; i < 12; i++) words[i] = 16'($urandom);
    expected = '0;
    for (int i = 0; i < 12; i++) expected[223-16*i -: 16] = words[i];
    #100 reset = 0;
    #200;

    // start by register pulse, measure latency in CLK cycles
    pulse_start();
    lat = 0;
    while (!dv) begin @(posedge clk); #1; lat++; end
    check(lat >= 2 && lat <= 5, $sformatf("start latency %0d CLK cycles", lat));
    // a second start during the frame is ignored
    repeat (50) @(posedge clk);
    pulse_start();
    wait (frames == 1);
    repeat (20) @(posedge clk);
    check(frames == 1 && !dv, "start during a frame ignored");

    // hard trigger without TX_EXT_EN does nothing
    @(negedge clk); hard = 1; repeat (3) @(negedge clk); hard = 0;
    repeat (20) @(posedge clk);
    check(!dv && frames == 1, "HARD_TRIGGER ignored without TX_EXT_EN");

    // with TX_EXT_EN, a hard trigger edge starts a frame; new words
    for (int i = 0; i < 12; i++) words[i] = 16'($urandom);
    expected = '0;
    for (int i = 0; i < 12; i++) expected[223-16*i -: 16] = words[i];
    ext_en = 1;
    repeat (4) @(negedge clk);
    hard = 1; @(negedge clk); #1;
    check(!dv, "DATA_VALID still low in the load cycle");
    @(negedge clk); #1;
    check(dv, "DATA_VALID high one cycle after the load");
    repeat (5) @(negedge clk); hard = 0;
    wait (frames == 2);
    repeat (10) @(posedge clk);
    check(frames == 2, "two frames sent");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
