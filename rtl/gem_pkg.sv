// gem_pkg: constants shared by the GEM readout firmware.
//
// Register map of the user FPGA on the V1495 local bus (byte addresses,
// every register 16 bits wide, so bit 0 of REG_ADDR is ignored), the VFAT2
// T1 command codes, and the sizes of the receive path. Addresses, codes and
// sizes follow the firmware documentation; the only addition is
// A_GEM_CALIB_START, which the documentation places at 0x000E inside the
// block it otherwise lists as reserved.
package gem_pkg;

  // Number of VFAT receive channels: GEM block A and B, six chips each.
  localparam int unsigned N_CH       = 12;
  // Number of 16-bit words loaded into the debug transmitter.
  localparam int unsigned N_TX_WORDS = 12;

  // User register map (byte addresses).
  localparam logic [15:0] A_BOARDIDS          = 16'h0000;
  localparam logic [15:0] A_REVISION          = 16'h0002;
  localparam logic [15:0] A_RESET             = 16'h0004;
  localparam logic [15:0] A_GEM_CALIB_START   = 16'h000E;
  localparam logic [15:0] A_GEM_TX_START      = 16'h0010;
  localparam logic [15:0] A_GEM_SOFT_TRIG     = 16'h0012;
  localparam logic [15:0] A_GEM_TRIG_WORD     = 16'h0014;
  localparam logic [15:0] A_GEM_TX_WORD       = 16'h0016; // 12 registers
  localparam logic [15:0] A_GEM_FIFOSIZE      = 16'h0030; // 12 registers
  localparam logic [15:0] A_GEM_EVENTSIZE     = 16'h0048; // 12 registers
  localparam logic [15:0] A_GEM_EVENTS_SENT_H = 16'h0080; // 12 registers
  localparam logic [15:0] A_GEM_EVENTS_SENT_L = 16'h00A0; // 12 registers
  localparam logic [15:0] A_GEM_EVENTDATA     = 16'h4000; // 12 windows of 256 bytes
  localparam logic [15:0] EVENTDATA_END       = 16'h4BFF;

  // Value of A_GEM_CALIB_START that selects externally triggered calibration.
  localparam logic [15:0] CALIB_EXTERNAL      = 16'hFFFF;

  // VFAT2 T1 command words, sent MSB first.
  localparam logic [2:0] T1_LV1A     = 3'b100;
  localparam logic [2:0] T1_CALPULSE = 3'b110;

  // Calibration sequence: CalPulse, one blank clock, LV1A, one trailing blank.
  localparam logic [7:0] T1_CALIB_SEQ = {T1_CALPULSE, 1'b0, T1_LV1A, 1'b0};

  // Reset values of the trigger word register.
  localparam logic [2:0] HARD_TRIG_WORD_RST = T1_LV1A;
  localparam logic [2:0] SOFT_TRIG_WORD_RST = 3'b000;

  // Status of one receive channel as seen from the local-bus clock domain.
  typedef struct packed {
    logic [3:0]  event_size;      // head of the SizeFIFO
    logic [5:0]  event_count;     // words in the SizeFIFO
    logic [15:0] event_data;      // head of the DataFIFO
    logic [9:0]  event_data_size; // words in the DataFIFO
    logic [31:0] events_sent;     // events received since reset
  } rx_status_t;

endpackage
