// gem_trigger: builds the T1 command stream sent to the VFATs.
//
// A single trigger pulse is turned into a serial T1 command, sent MSB first,
// one bit per PLLCLK_90 rising edge (PLLCLK_90 is the inverse of PLLCLK, so
// the VFATs, which sample on the other edge, see stable bits). Sources:
//   hard trigger  - rising edge of the G1 input (GIN1), sampled on PLLCLK
//                   into HARD_TRIGGER; sends HARD_TRIG_WORD (3 bits);
//   soft trigger  - a write to the soft-trigger register; sends
//                   SOFT_TRIG_WORD (3 bits);
//   calibration   - CalPulse "110", one blank clock, LV1A "100" (sent as the
//                   8-bit word 1100_1000). It fires once after a write of
//                   any value other than 0xFFFF to the calibration register
//                   (CALIB_FIRE), or, while that register holds 0xFFFF
//                   (CALIB_EXT high), on every rising edge of GIN1, which is
//                   then withheld from HARD_TRIGGER.
// This behaviour follows the firmware documentation.
//
// Choices of this design: LCLK-domain requests arrive as single pulses and
// are carried over by toggle synchronisers; CALIB_EXT is synchronised by two
// flip-flops; the trigger words are register values taken as static; when
// several triggers coincide the calibration sequence wins over the hard
// trigger, which wins over the soft trigger; a trigger that arrives while a
// command is still being sent is dropped. T1 idles low.
// Timing: the PLLCLK edge that samples GIN1 high is followed half a cycle
// later by the PLLCLK_90 edge that loads the command; the next PLLCLK_90
// edge drives its first bit, which the VFATs take on the PLLCLK edge two
// cycles after the sampling edge.
module gem_trigger
  import gem_pkg::*;
(
  input  logic       LCLK,
  input  logic       PLLCLK,
  input  logic       PLLCLK_90,
  input  logic       RESET,          // asynchronous, active high
  input  logic       GIN1,           // external trigger input
  input  logic       SOFT_TRIGGER,   // LCLK pulse
  input  logic       CALIB_FIRE,     // LCLK pulse: one calibration sequence
  input  logic       CALIB_EXT,      // LCLK level: calibration on GIN1
  input  logic [2:0] HARD_TRIG_WORD,
  input  logic [2:0] SOFT_TRIG_WORD,
  output logic       HARD_TRIGGER,   // PLLCLK-domain level, to the TX channel
  output logic       T1
);
  // ---------------- PLLCLK domain: sample the G1 input ----------------
  logic calib_ext_s1, calib_ext_s2, calib_trigger;

  always_ff @(posedge PLLCLK or posedge RESET) begin
    if (RESET) begin
      calib_ext_s1  <= 1'b0;
      calib_ext_s2  <= 1'b0;
      HARD_TRIGGER  <= 1'b0;
      calib_trigger <= 1'b0;
    end else begin
      calib_ext_s1 <= CALIB_EXT;
      calib_ext_s2 <= calib_ext_s1;
      if (!calib_ext_s2) HARD_TRIGGER <= GIN1;
      calib_trigger <= calib_ext_s2 && GIN1;
    end
  end

  // ---------------- PLLCLK_90 domain: serialiser ----------------
  logic soft_p, calib_p;
  logic hard_q, calib_q;
  logic [7:0] sr;
  logic [3:0] cnt;

  gem_pulse_sync u_soft_sync (
    .src_clk(LCLK), .dst_clk(PLLCLK_90), .rst(RESET),
    .src_pulse(SOFT_TRIGGER), .dst_pulse(soft_p)
  );

  gem_pulse_sync u_calib_sync (
    .src_clk(LCLK), .dst_clk(PLLCLK_90), .rst(RESET),
    .src_pulse(CALIB_FIRE), .dst_pulse(calib_p)
  );

  logic hard_rise, calib_rise;
  assign hard_rise  = HARD_TRIGGER && !hard_q;
  assign calib_rise = calib_trigger && !calib_q;

  always_ff @(posedge PLLCLK_90 or posedge RESET) begin
    if (RESET) begin
      hard_q  <= 1'b0;
      calib_q <= 1'b0;
      sr      <= '0;
      cnt     <= '0;
      T1      <= 1'b0;
    end else begin
      hard_q  <= HARD_TRIGGER;
      calib_q <= calib_trigger;
      if (cnt != '0) begin
        T1  <= sr[7];
        sr  <= sr << 1;
        cnt <= cnt - 1'b1;
      end else begin
        T1 <= 1'b0;
        if (calib_p || calib_rise) begin
          sr  <= T1_CALIB_SEQ;
          cnt <= 4'd8;
        end else if (hard_rise) begin
          sr  <= {HARD_TRIG_WORD, 5'b0};
          cnt <= 4'd3;
        end else if (soft_p) begin
          sr  <= {SOFT_TRIG_WORD, 5'b0};
          cnt <= 4'd3;
        end
      end
    end
  end

endmodule
