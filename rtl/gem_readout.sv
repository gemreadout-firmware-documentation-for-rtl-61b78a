// gem_readout: user-FPGA firmware of a CAEN V1495 VME board reading out
// twelve VFAT2 front-end chips of a GEM detector.
//
// The VME host talks to this logic through the board's local bus (register
// interface REG_*), clocked by the 40 MHz LCLK. The VFATs run on MCLK, an
// external clock brought in on G0; inside the FPGA it is PLLCLK, and its
// inverse PLLCLK_90 is what the VFATs receive and what times the T1 trigger
// line. The blocks:
//   gem_regs        register file on the local bus (LCLK)
//   gem_reset_led   RESET sequencing, heartbeat and reset LEDs (LCLK)
//   gem_trigger     hard/soft/calibration triggers -> serial T1 commands
//   gem_rx_channel  x12, deserialise each VFAT's DataOut into 16-bit words,
//                   buffer them in a DataFIFO, one SizeFIFO entry per event
//   gem_tx_channel  debug transmitter sending a VFAT-like 224-bit frame
//
// This is the no-PLL build the documentation describes for MCLK below
// 15 MHz: PLLCLK is G0 itself and PLLCLK_90 its inverse, and the PLL lock
// input of the reset logic is tied high.
//
// Pin use (this design's choice where the documentation only says that
// ports A, C and G are used):
//   GIN[0]          MCLK;  GIN[1] hard / external calibration trigger
//   A[2k], A[2k+1]  DATA and DATA_VALID of channel k (k = 0..11; 0-5 GEM
//                   block A, 6-11 block B)
//   C[11:0]         T1 to each VFAT;  C[23:12] MCLK (PLLCLK_90) to each VFAT
//   C[24], C[25]    debug transmitter DATA and DATA_VALID;  C[31:26] low
// Ports B, D, E, F and the spare I/Os are not used: outputs are driven low,
// the mezzanine ports are left disabled, G is configured as a TTL input
// (SELG high, nOEG high) and the spare pins as inputs.
module gem_readout
  import gem_pkg::*;
#(
  parameter logic [15:0] REVISION = 16'h0001
) (
  input  logic        nLBRES,
  input  logic        LCLK,
  input  logic        REG_WREN,
  input  logic        REG_RDEN,
  input  logic [15:0] REG_ADDR,
  input  logic [15:0] REG_DIN,
  output logic [15:0] REG_DOUT,
  input  logic        USR_ACCESS,
  input  logic [31:0] A,
  input  logic [31:0] B,
  output logic [31:0] C,
  output logic        SELG,
  output logic        nOEG,
  output logic [1:0]  GOUT,
  input  logic [1:0]  GIN,
  input  logic [2:0]  IDD,
  output logic        SELD,
  output logic        nOED,
  input  logic [31:0] D,
  input  logic [2:0]  IDE,
  output logic        SELE,
  output logic        nOEE,
  output logic [31:0] E,
  input  logic [2:0]  IDF,
  output logic        SELF,
  output logic        nOEF,
  input  logic [31:0] F,
  output logic [11:0] SPARE_OUT,
  input  logic [11:0] SPARE_IN,
  output logic [11:0] SPARE_DIR,
  output logic        RED_PULSE,
  output logic        GREEN_PULSE
);
  // ---------------- clocks (no-PLL build) ----------------
  logic PLLCLK, PLLCLK_90;
  assign PLLCLK    = GIN[0];
  assign PLLCLK_90 = ~GIN[0];

  // ---------------- reset and LEDs ----------------
  logic RESET, REG_RESET;

  gem_reset_led u_reset_led (
    .LCLK       (LCLK),
    .nLBRES     (nLBRES),
    .PLL_LOCK   (1'b1),
    .REG_RESET  (REG_RESET),
    .RESET      (RESET),
    .RED_PULSE  (RED_PULSE),
    .GREEN_PULSE(GREEN_PULSE)
  );

  // ---------------- register file ----------------
  rx_status_t  rx_status     [N_CH];
  logic        rd_event_size [N_CH];
  logic        rd_event_data [N_CH];
  logic [15:0] gem_tx_word   [N_TX_WORDS];
  logic        gem_tx_start, gem_tx_start_ext_en, soft_trigger;
  logic [2:0]  hard_trig_word, soft_trig_word;
  logic        calib_fire, calib_ext;

  gem_regs #(.REVISION(REVISION)) u_regs (
    .LCLK               (LCLK),
    .nLBRES             (nLBRES),
    .REG_WREN           (REG_WREN),
    .REG_RDEN           (REG_RDEN),
    .REG_ADDR           (REG_ADDR),
    .REG_DIN            (REG_DIN),
    .REG_DOUT           (REG_DOUT),
    .USR_ACCESS         (USR_ACCESS),
    .IDD                (IDD),
    .IDE                (IDE),
    .IDF                (IDF),
    .RX_STATUS          (rx_status),
    .RD_EVENT_SIZE      (rd_event_size),
    .RD_EVENT_DATA      (rd_event_data),
    .GEM_TX_WORD        (gem_tx_word),
    .GEM_TX_START       (gem_tx_start),
    .GEM_TX_START_EXT_EN(gem_tx_start_ext_en),
    .SOFT_TRIGGER       (soft_trigger),
    .HARD_TRIG_WORD     (hard_trig_word),
    .SOFT_TRIG_WORD     (soft_trig_word),
    .CALIB_FIRE         (calib_fire),
    .CALIB_EXT          (calib_ext),
    .REG_RESET          (REG_RESET)
  );

  // ---------------- trigger ----------------
  logic hard_trigger, t1;

  gem_trigger u_trigger (
    .LCLK          (LCLK),
    .PLLCLK        (PLLCLK),
    .PLLCLK_90     (PLLCLK_90),
    .RESET         (RESET),
    .GIN1          (GIN[1]),
    .SOFT_TRIGGER  (soft_trigger),
    .CALIB_FIRE    (calib_fire),
    .CALIB_EXT     (calib_ext),
    .HARD_TRIG_WORD(hard_trig_word),
    .SOFT_TRIG_WORD(soft_trig_word),
    .HARD_TRIGGER  (hard_trigger),
    .T1            (t1)
  );

  // ---------------- receive channels ----------------
  for (genvar k = 0; k < N_CH; k++) begin : g_rx
    gem_rx_channel u_rx (
      .LCLK           (LCLK),
      .RD_EVENT_SIZE  (rd_event_size[k]),
      .EVENT_SIZE     (rx_status[k].event_size),
      .EVENT_COUNT    (rx_status[k].event_count),
      .RD_EVENT_DATA  (rd_event_data[k]),
      .EVENT_DATA     (rx_status[k].event_data),
      .EVENT_DATA_SIZE(rx_status[k].event_data_size),
      .GEM_EVENTS_SENT(rx_status[k].events_sent),
      .CLK            (PLLCLK),
      .RESET          (RESET),
      .DATA           (A[2*k]),
      .DATA_VALID     (A[2*k+1])
    );
  end

  // ---------------- debug transmitter ----------------
  logic gem_tx_data, gem_tx_data_valid;

  gem_tx_channel u_tx (
    .LCLK        (LCLK),
    .GEM_TX_WORD (gem_tx_word),
    .GEM_TX_START(gem_tx_start),
    .CLK         (PLLCLK),
    .RESET       (RESET),
    .TX_EXT_EN   (gem_tx_start_ext_en),
    .HARD_TRIGGER(hard_trigger),
    .DATA        (gem_tx_data),
    .DATA_VALID  (gem_tx_data_valid)
  );

  // ---------------- front-panel outputs ----------------
  assign C = {6'b0, gem_tx_data_valid, gem_tx_data, {N_CH{PLLCLK_90}}, {N_CH{t1}}};

  assign SELG      = 1'b1;
  assign nOEG      = 1'b1;
  assign GOUT      = 2'b00;
  assign SELD      = 1'b0;
  assign nOED      = 1'b1;
  assign SELE      = 1'b0;
  assign nOEE      = 1'b1;
  assign E         = '0;
  assign SELF      = 1'b0;
  assign nOEF      = 1'b1;
  assign SPARE_OUT = '0;
  assign SPARE_DIR = '1;

endmodule
