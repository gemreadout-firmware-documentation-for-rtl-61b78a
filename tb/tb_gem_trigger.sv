// tb_gem_trigger: self-checking test of the T1 trigger generator.
//
// PLLCLK runs at 10 MHz, PLLCLK_90 is its inverse, LCLK runs at 40 MHz.
// T1 is sampled on PLLCLK rising edges (where the VFATs sample it). Each
// scenario records the T1 stream and compares the bits from the first 1
// onwards with the expected command: hard trigger word, soft_p trigger word,
// the 8-bit calibration sequence after a calibration write, the calibration
// sequence on GIN1 in external mode (with HARD_TRIGGER held low), and a
// second trigger arriving while a command is sent being dropped. The latency
// from a GIN1 edge to the first T1 bit is checked as well.
`timescale 1ns/1ps
module tb_gem_trigger;
  import gem_pkg::*;
  int checks = 0, failures = 0;

  logic lclk = 0, pllclk = 0;
  always #12.5 lclk   = ~lclk;
  always #50   pllclk = ~pllclk;

  logic       reset = 1, gin1 = 0, soft_p = 0, cfire = 0, cext = 0;
  logic [2:0] hword = T1_LV1A, sword = 3'b101;
  logic       hard_trigger, t1;

  gem_trigger dut (
    .LCLK(lclk), .PLLCLK(pllclk), .PLLCLK_90(~pllclk), .RESET(reset), .GIN1(gin1),
    .SOFT_TRIGGER(soft_p), .CALIB_FIRE(cfire), .CALIB_EXT(cext),
    .HARD_TRIG_WORD(hword), .SOFT_TRIG_WORD(sword), .HARD_TRIGGER(hard_trigger), .T1(t1));

  bit   stream[$];
  int   hard_seen = 0;
  always @(posedge pllclk) begin
    stream.push_back(t1);
    if (hard_trigger) hard_seen++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Compare the recorded stream with one command of nbits bits.
  task automatic expect_cmd(input logic [7:0] cmd, input int nbits, input string what);
    int first = -1, ones = 0, exp_ones = 0;
    bit ok = 1;
    repeat (20) @(posedge pllclk);
    foreach (stream[i]) begin
      if (stream[i]) ones++;
      if (stream[i] && first < 0) first = i;
    end
    for (int b = 0; b < nbits; b++) if (cmd[7-b]) exp_ones++;
    if (first < 0) ok = 0;
    else for (int b = 0; b < nbits; b++)
      if (first + b >= stream.size() || stream[first+b] != cmd[7-b]) ok = 0;
    check(ok && ones == exp_ones, what);
    stream.delete();
  endtask

  task automatic lclk_pulse(ref logic s);
    @(negedge lclk); s = 1; @(negedge lclk); s = 0;
  endtask

  initial begin
    int lat;
    #300 reset = 0;
    repeat (4) @(posedge pllclk);
    stream.delete();

    // hard trigger: GIN1 edge -> HARD_TRIG_WORD; measure latency
    @(negedge pllclk); gin1 = 1;
    lat = 0;
    while (!t1) begin @(posedge pllclk); lat++; end
    check(lat == 3, $sformatf("GIN1 to first T1 bit: %0d PLLCLK cycles", lat));
    repeat (5) @(negedge pllclk); gin1 = 0;
    expect_cmd({T1_LV1A, 5'b0}, 3, "hard trigger sends LV1A 100");
    check(hard_seen > 0, "HARD_TRIGGER follows GIN1");

    // programmable hard trigger word
    hword = 3'b111;
    @(negedge pllclk); gin1 = 1; repeat (5) @(negedge pllclk); gin1 = 0;
    expect_cmd(8'b1110_0000, 3, "hard trigger sends programmed word 111");

    // soft_p trigger
    lclk_pulse(soft_p);
    expect_cmd({3'b101, 5'b0}, 3, "soft_p trigger sends SOFT_TRIG_WORD 101");

    // single calibration sequence
    lclk_pulse(cfire);
    expect_cmd(T1_CALIB_SEQ, 8, "calibration sends 110, blank, 100");

    // external calibration: GIN1 fires the sequence, HARD_TRIGGER held low
    cext = 1;
    repeat (4) @(posedge pllclk);
    hard_seen = 0;
    @(negedge pllclk); gin1 = 1; repeat (5) @(negedge pllclk); gin1 = 0;
    expect_cmd(T1_CALIB_SEQ, 8, "external calibration on GIN1");
    check(hard_seen == 0, "HARD_TRIGGER withheld in external calibration mode");
    @(negedge pllclk); gin1 = 1; repeat (5) @(negedge pllclk); gin1 = 0;
    expect_cmd(T1_CALIB_SEQ, 8, "external calibration repeats on each GIN1 pulse");
    cext = 0;
    repeat (4) @(posedge pllclk);
    stream.delete();

    // a trigger during a command is dropped: calibration then soft_p at once
    hword = T1_LV1A;
    lclk_pulse(cfire);
    repeat (3) @(posedge pllclk);
    lclk_pulse(soft_p);
    expect_cmd(T1_CALIB_SEQ, 8, "soft_p trigger during calibration sequence dropped");

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
