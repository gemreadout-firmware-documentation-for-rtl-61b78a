// gem_reset_led: system reset sequencing and front-panel LED drive.
//
// RESET, the reset of the MCLK-side logic (receive and transmit channels,
// trigger), comes from a 3-bit shift register SRESET clocked by LCLK. While
// the board reset nLBRES is low, or the PLL reports no lock, SRESET is forced
// to "111" and RESET to 1. On each LCLK rising edge SRESET shifts right by
// one, taking REG_RESET (a write to the reset register) into its MSB, and
// RESET takes the old LSB. RESET therefore falls on the fourth LCLK rising
// edge after nLBRES is released, and a REG_RESET pulse sampled on edge k
// produces a RESET pulse from edge k+3 to edge k+4.
//
// HEART_BEAT_CNT counts LCLK cycles; its bit 25 drives the green LED
// (40 MHz / 2**26 = 0.60 Hz, 50 % duty cycle). The red LED shows RESET.
// All of this follows the firmware documentation; the counter width (26
// bits, the least that holds bit 25) is this design's choice. In the
// no-PLL build PLL_LOCK is tied high.
module gem_reset_led #(
  parameter int unsigned HB_BIT = 25
) (
  input  logic LCLK,
  input  logic nLBRES,      // asynchronous, active low
  input  logic PLL_LOCK,
  input  logic REG_RESET,   // one LCLK cycle per write to the reset register
  output logic RESET,
  output logic RED_PULSE,
  output logic GREEN_PULSE
);
  logic [2:0]        sreset;
  logic [HB_BIT:0]   heart_beat_cnt;
  logic              arst;

  assign arst = !nLBRES || !PLL_LOCK;

  always_ff @(posedge LCLK or posedge arst) begin
    if (arst) begin
      sreset <= 3'b111;
      RESET  <= 1'b1;
    end else begin
      sreset <= {REG_RESET, sreset[2:1]};
      RESET  <= sreset[0];
    end
  end

  always_ff @(posedge LCLK or negedge nLBRES) begin
    if (!nLBRES) heart_beat_cnt <= '0;
    else heart_beat_cnt <= heart_beat_cnt + 1'b1;
  end

  assign GREEN_PULSE = heart_beat_cnt[HB_BIT];
  assign RED_PULSE   = RESET;

endmodule
