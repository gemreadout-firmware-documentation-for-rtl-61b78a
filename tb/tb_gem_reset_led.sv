// tb_gem_reset_led: self-checking test of reset sequencing and the LEDs.
//
// With a 40 MHz LCLK it checks: RESET and the red LED are high during
// nLBRES and fall on the fourth LCLK edge after its release; a REG_RESET
// pulse gives exactly one RESET cycle, three edges later; a lost PLL lock
// forces RESET; the green LED (bit 25 of the heartbeat counter) first rises
// exactly 2**25 LCLK cycles after reset, i.e. a 0.60 Hz blink at 40 MHz,
// and (on a second copy taking the LED from bit 3) the 50 % duty cycle.
`timescale 1ns/1ps
module tb_gem_reset_led;
  int checks = 0, failures = 0;

  logic lclk = 0;
  always #12.5 lclk = ~lclk;

  logic nlbres = 1, lock = 1, reg_reset = 0;
  logic reset, red, green;

  gem_reset_led dut (
    .LCLK(lclk), .nLBRES(nlbres), .PLL_LOCK(lock), .REG_RESET(reg_reset),
    .RESET(reset), .RED_PULSE(red), .GREEN_PULSE(green));

  logic reset4, red4, green4;
  gem_reset_led #(.HB_BIT(3)) dut4 (
    .LCLK(lclk), .nLBRES(nlbres), .PLL_LOCK(1'b1), .REG_RESET(1'b0),
    .RESET(reset4), .RED_PULSE(red4), .GREEN_PULSE(green4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n;
    #2 nlbres = 0;
    #3;
    check(reset && red && !green, "reset active while nLBRES low");
    repeat (3) @(posedge lclk);
    @(negedge lclk) nlbres = 1;
    n = 0;
    while (reset) begin @(posedge lclk); #1; n++; end
    check(n == 4, $sformatf("RESET falls on edge %0d after release, expected 4", n));
    check(!red, "red LED off after reset");

    // register reset
    repeat (5) @(negedge lclk);
    reg_reset = 1; @(negedge lclk); reg_reset = 0;   // sampled on one edge
    n = 0;
    for (int i = 1; i <= 6; i++) begin
      @(posedge lclk); #1;
      if (reset) n++;
      if (i == 3) check(reset, "RESET high on third edge after REG_RESET");
    end
    check(n == 1, $sformatf("REG_RESET gives %0d RESET cycles, expected 1", n));

    // PLL lock lost
    #3 lock = 0; #1;
    check(reset && red, "lost PLL lock forces RESET");
    @(negedge lclk) lock = 1;
    repeat (6) @(posedge lclk);
    check(!reset, "RESET released after lock returns");

    // heartbeat: restart counter and time the first rising edge of bit 25
    @(negedge lclk) nlbres = 0;
    @(negedge lclk) nlbres = 1;
    n = 0;
    while (!green) begin @(posedge lclk); #1; n++; end
    check(n == (1 << 25), $sformatf("green LED rises after %0d cycles, expected 2**25", n));
    // duty cycle, on a copy with the LED taken from bit 3
    n = 0;
    while (!green4) begin @(posedge lclk); #1; end
    while (green4) begin @(posedge lclk); #1; n++; end
    check(n == 8, $sformatf("LED bit high for %0d cycles, expected 8 (50%% duty)", n));
    n = 0;
    while (!green4) begin @(posedge lclk); #1; n++; end
    check(n == 8, "LED bit low for 8 cycles");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
