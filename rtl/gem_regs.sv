// gem_regs: user register file on the V1495 local bus.
//
// The local-bus controller presents one register access at a time as a
// one-LCLK-cycle REG_WREN or REG_RDEN with a byte address REG_ADDR
// (registers are 16 bits, bit 0 is ignored) and, for writes, REG_DIN.
// Accesses count only while USR_ACCESS is high. Register map (see gem_pkg):
//   0x0000 BOARDIDS          r  {IDF, IDE, IDD} mezzanine identifiers
//   0x0002 REVISION          r  firmware revision (parameter)
//   0x0004 RESET             w  requests a system reset (REG_RESET pulse)
//   0x000E CALIB_START       rw 0xFFFF: calibration on each external trigger;
//                               other values: one calibration sequence now
//   0x0010 TX_START          w  starts one debug frame; bit 0 -> TX_EXT_EN
//   0x0012 SOFT_TRIG         w  sends the soft trigger word
//   0x0014 TRIG_WORD         rw bits 5-3 hard trigger word, 2-0 soft word
//   0x0016+2i TX_WORD i      rw debug transmit words, i = 0..11
//   0x0030+2i FIFOSIZE i     r  {SizeFIFO fill [15:10], DataFIFO fill [9:0]}
//   0x0048+2i EVENTSIZE i    r  oldest SizeFIFO entry, removed by the read
//   0x0080+2i EVENTS_SENT_H  r  event counter bits 31-16
//   0x00A0+2i EVENTS_SENT_L  r  event counter bits 15-0
//   0x4000+256i..+255 EVENTDATA i  r  oldest DataFIFO word, removed by the read
// Channel i = 0..5 is GEM block A chip 0..5, i = 6..11 block B chip 0..5.
// Unmapped addresses read as 0.
//
// Timing: REG_DOUT is registered; it holds the value read from the LCLK edge
// at the end of the REG_RDEN cycle until the next read. The FIFO pops
// (RD_EVENT_SIZE / RD_EVENT_DATA) are combinational and happen on that same
// edge, so the word returned is the one removed. Request outputs
// (SOFT_TRIGGER, TX_START, CALIB_FIRE, REG_RESET) are one-cycle pulses.
//
// Map, field positions and reset values follow the documentation, which
// however gives the hard trigger word a reset value of "100" (LV1A) in its
// text and 0 in its process description; this design uses "100". Bit
// positions inside BOARDIDS and FIFOSIZE, the TX_EXT_EN bit, the REVISION
// value, the registered read data and the use of USR_ACCESS are this
// design's choices.
module gem_regs
  import gem_pkg::*;
#(
  parameter logic [15:0] REVISION = 16'h0001
) (
  input  logic        LCLK,
  input  logic        nLBRES,
  input  logic        REG_WREN,
  input  logic        REG_RDEN,
  input  logic [15:0] REG_ADDR,
  input  logic [15:0] REG_DIN,
  output logic [15:0] REG_DOUT,
  input  logic        USR_ACCESS,
  input  logic [2:0]  IDD,
  input  logic [2:0]  IDE,
  input  logic [2:0]  IDF,
  // receive channels
  input  rx_status_t  RX_STATUS     [N_CH],
  output logic        RD_EVENT_SIZE [N_CH],
  output logic        RD_EVENT_DATA [N_CH],
  // control
  output logic [15:0] GEM_TX_WORD   [N_TX_WORDS],
  output logic        GEM_TX_START,
  output logic        GEM_TX_START_EXT_EN,
  output logic        SOFT_TRIGGER,
  output logic [2:0]  HARD_TRIG_WORD,
  output logic [2:0]  SOFT_TRIG_WORD,
  output logic        CALIB_FIRE,
  output logic        CALIB_EXT,
  output logic        REG_RESET
);
  logic wr, rd;
  assign wr = REG_WREN && USR_ACCESS;
  assign rd = REG_RDEN && USR_ACCESS;

  logic [15:0] addr;
  assign addr = {REG_ADDR[15:1], 1'b0};

  // Index of a register inside a block of N_CH (or N_TX_WORDS) 16-bit
  // registers starting at BASE; -1 when the address is outside the block.
  function automatic int reg_index(input logic [15:0] a, input logic [15:0] base,
                                   input int unsigned n);
    logic [15:0] off;
    off = a - base;
    if (a >= base && off < 16'(2 * n)) return int'(off[15:1]);
    return -1;
  endfunction

  logic        in_evdata;
  logic [3:0]  evdata_ch;
  assign in_evdata = (addr >= A_GEM_EVENTDATA) && (addr <= EVENTDATA_END);
  assign evdata_ch = addr[11:8];

  logic [15:0] calib_size;
  logic [15:0] rdata;

  // Read multiplexer.
  always_comb begin
    int i;
    rdata = '0;
    unique case (addr)
      A_BOARDIDS:        rdata = {7'b0, IDF, IDE, IDD};
      A_REVISION:        rdata = REVISION;
      A_GEM_CALIB_START: rdata = calib_size;
      A_GEM_TRIG_WORD:   rdata = {10'b0, HARD_TRIG_WORD, SOFT_TRIG_WORD};
      default: begin
        i = reg_index(addr, A_GEM_TX_WORD, N_TX_WORDS);
        if (i >= 0) rdata = GEM_TX_WORD[i];
        i = reg_index(addr, A_GEM_FIFOSIZE, N_CH);
        if (i >= 0) rdata = {RX_STATUS[i].event_count, RX_STATUS[i].event_data_size};
        i = reg_index(addr, A_GEM_EVENTSIZE, N_CH);
        if (i >= 0) rdata = 16'(RX_STATUS[i].event_size);
        i = reg_index(addr, A_GEM_EVENTS_SENT_H, N_CH);
        if (i >= 0) rdata = RX_STATUS[i].events_sent[31:16];
        i = reg_index(addr, A_GEM_EVENTS_SENT_L, N_CH);
        if (i >= 0) rdata = RX_STATUS[i].events_sent[15:0];
        if (in_evdata && 32'(evdata_ch) < N_CH) rdata = RX_STATUS[evdata_ch].event_data;
      end
    endcase
  end

  // FIFO pops on reads of the event size and event data registers.
  always_comb begin
    for (int c = 0; c < int'(N_CH); c++) begin
      RD_EVENT_SIZE[c] = rd && (reg_index(addr, A_GEM_EVENTSIZE, N_CH) == c);
      RD_EVENT_DATA[c] = rd && in_evdata && (32'(evdata_ch) == 32'(c));
    end
  end

  always_ff @(posedge LCLK or negedge nLBRES) begin
    if (!nLBRES) begin
      REG_DOUT            <= '0;
      GEM_TX_WORD         <= '{default: '0};
      GEM_TX_START        <= 1'b0;
      GEM_TX_START_EXT_EN <= 1'b0;
      SOFT_TRIGGER        <= 1'b0;
      HARD_TRIG_WORD      <= HARD_TRIG_WORD_RST;
      SOFT_TRIG_WORD      <= SOFT_TRIG_WORD_RST;
      CALIB_FIRE          <= 1'b0;
      CALIB_EXT           <= 1'b0;
      calib_size          <= '0;
      REG_RESET           <= 1'b0;
    end else begin
      GEM_TX_START <= 1'b0;
      SOFT_TRIGGER <= 1'b0;
      CALIB_FIRE   <= 1'b0;
      REG_RESET    <= 1'b0;
      if (rd) REG_DOUT <= rdata;
      if (wr) begin
        unique case (addr)
          A_RESET:         REG_RESET <= 1'b1;
          A_GEM_TX_START: begin
            GEM_TX_START        <= 1'b1;
            GEM_TX_START_EXT_EN <= REG_DIN[0];
          end
          A_GEM_SOFT_TRIG: SOFT_TRIGGER <= 1'b1;
          A_GEM_TRIG_WORD: begin
            HARD_TRIG_WORD <= REG_DIN[5:3];
            SOFT_TRIG_WORD <= REG_DIN[2:0];
          end
          A_GEM_CALIB_START: begin
            calib_size <= REG_DIN;
            CALIB_EXT  <= (REG_DIN == CALIB_EXTERNAL);
            CALIB_FIRE <= (REG_DIN != CALIB_EXTERNAL);
          end
          default: begin
            int i;
            i = reg_index(addr, A_GEM_TX_WORD, N_TX_WORDS);
            if (i >= 0) GEM_TX_WORD[i] <= REG_DIN;
          end
        endcase
      end
    end
  end

  // The local-bus controller issues one access at a time.
  a_one_access: assert property (@(posedge LCLK) disable iff (!nLBRES)
                                 !(REG_WREN && REG_RDEN));

endmodule
