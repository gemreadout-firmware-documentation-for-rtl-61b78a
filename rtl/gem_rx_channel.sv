// gem_rx_channel: receiver for one VFAT data stream.
//
// A VFAT sends an event as a serial bit stream on DATA, MSB first, while it
// holds DATA_VALID high. On every CLK (PLLCLK) rising edge with DATA_VALID
// high the bit is shifted into SHIFT_REG from the LSB side and BIT_COUNTER
// advances; every 16th bit completes a word, which is written to the
// DataFIFO and counted in WORD_COUNTER, unless the DataFIFO or the SizeFIFO
// is full, in which case the word is dropped. On the falling edge of
// DATA_VALID the event is over: GEM_EVENTS_SENT is incremented and
// WORD_COUNTER (the number of words stored for this event) is written to
// the SizeFIFO. RESET clears the counters and both FIFOs. This is the
// behaviour the firmware documentation describes.
//
// Choices of this design where the documentation is silent: BIT_COUNTER is
// held at zero while DATA_VALID is low, so every event starts on a word
// boundary; WORD_COUNTER restarts at zero after each event; RESET is
// asynchronous; a partial word left when DATA_VALID falls is discarded.
//
// Read side (LCLK): EVENT_DATA and EVENT_SIZE show the oldest entries of the
// two FIFOs (show-ahead); a one-cycle RD_EVENT_DATA / RD_EVENT_SIZE removes
// that entry. EVENT_DATA_SIZE and EVENT_COUNT are the FIFO fill counts and
// GEM_EVENTS_SENT the event counter, all in the LCLK domain, a few LCLK
// cycles behind the write side.
module gem_rx_channel #(
  parameter int unsigned WORD_W     = 16,
  parameter int unsigned DATA_DEPTH = 1024,
  parameter int unsigned SIZE_DEPTH = 64,
  parameter int unsigned SIZE_W     = 4
) (
  // local-bus side
  input  logic                          LCLK,
  input  logic                          RD_EVENT_SIZE,
  output logic [SIZE_W-1:0]             EVENT_SIZE,
  output logic [$clog2(SIZE_DEPTH)-1:0] EVENT_COUNT,
  input  logic                          RD_EVENT_DATA,
  output logic [WORD_W-1:0]             EVENT_DATA,
  output logic [$clog2(DATA_DEPTH)-1:0] EVENT_DATA_SIZE,
  output logic [31:0]                   GEM_EVENTS_SENT,
  // VFAT side
  input  logic                          CLK,
  input  logic                          RESET,
  input  logic                          DATA,
  input  logic                          DATA_VALID
);
  localparam int unsigned BW = $clog2(WORD_W);

  logic [WORD_W-1:0] shift_reg;
  logic [BW-1:0]     bit_counter;
  logic [SIZE_W-1:0] word_counter;
  logic [31:0]       events_sent;
  logic              dv_q;

  logic data_full, size_full;
  logic word_done, data_wr, size_wr;
  logic [WORD_W-1:0] word_in;

  assign word_in   = {shift_reg[WORD_W-2:0], DATA};
  assign word_done = DATA_VALID && (bit_counter == BW'(WORD_W - 1));
  assign data_wr   = word_done && !data_full && !size_full;
  assign size_wr   = !DATA_VALID && dv_q;

  always_ff @(posedge CLK or posedge RESET) begin
    if (RESET) begin
      shift_reg    <= '0;
      bit_counter  <= '0;
      word_counter <= '0;
      events_sent  <= '0;
      dv_q         <= 1'b0;
    end else begin
      dv_q <= DATA_VALID;
      if (DATA_VALID) begin
        shift_reg   <= word_in;
        bit_counter <= bit_counter + 1'b1;
        if (data_wr) word_counter <= word_counter + 1'b1;
      end else begin
        bit_counter <= '0;
        if (size_wr) begin
          events_sent  <= events_sent + 1'b1;
          word_counter <= '0;
        end
      end
    end
  end

  gem_dcfifo #(
    .WIDTH  (WORD_W),
    .DEPTH  (DATA_DEPTH),
    .USEDW_W($clog2(DATA_DEPTH))
  ) u_data_fifo (
    .aclr   (RESET),
    .wrclk  (CLK),
    .wrreq  (data_wr),
    .data   (word_in),
    .wrfull (data_full),
    .wrusedw(),
    .rdclk  (LCLK),
    .rdreq  (RD_EVENT_DATA),
    .q      (EVENT_DATA),
    .rdempty(),
    .rdusedw(EVENT_DATA_SIZE)
  );

  gem_dcfifo #(
    .WIDTH  (SIZE_W),
    .DEPTH  (SIZE_DEPTH),
    .USEDW_W($clog2(SIZE_DEPTH))
  ) u_size_fifo (
    .aclr   (RESET),
    .wrclk  (CLK),
    .wrreq  (size_wr),
    .data   (word_counter),
    .wrfull (size_full),
    .wrusedw(),
    .rdclk  (LCLK),
    .rdreq  (RD_EVENT_SIZE),
    .q      (EVENT_SIZE),
    .rdempty(),
    .rdusedw(EVENT_COUNT)
  );

  gem_gray_sync #(.W(32)) u_events_sync (
    .src_clk(CLK),
    .dst_clk(LCLK),
    .rst    (RESET),
    .src_bin(events_sent),
    .dst_bin(GEM_EVENTS_SENT)
  );

endmodule
