// gem_tx_channel: debug transmitter that imitates a VFAT data packet.
//
// Twelve 16-bit words, written over the local bus, are sent as one serial
// frame. A start request loads BIT_COUNTER with FRAME_BITS (224) and the
// transmit shift register with GEM_TX_WORD_0 .. GEM_TX_WORD_B concatenated
// in that order (word 0 leaves first); the bits below the 192 data bits are
// zero. On each following CLK rising edge DATA takes the MSB of the shift
// register, DATA_VALID is high, the register shifts left and BIT_COUNTER
// counts down; when it reaches zero DATA_VALID drops. DATA_VALID is therefore
// high for exactly FRAME_BITS cycles, starting one cycle after the load.
// A frame starts on a GEM_TX_START request, or, when TX_EXT_EN is high, on a
// rising edge of HARD_TRIGGER; requests that arrive while a frame is being
// sent are ignored. This follows the firmware documentation.
//
// Choices of this design: GEM_TX_START is a one-cycle pulse in the LCLK
// domain, carried into the CLK domain by a toggle synchroniser (a few CLK
// cycles of latency); TX_EXT_EN is synchronised by two flip-flops; the TX
// words are taken as static while a frame is loaded; a RESET input, which the
// documented port list does not have, gives the counters a defined start.
module gem_tx_channel #(
  parameter int unsigned N_WORDS    = 12,
  parameter int unsigned FRAME_BITS = 224
) (
  input  logic        LCLK,
  input  logic [15:0] GEM_TX_WORD [N_WORDS],
  input  logic        GEM_TX_START,   // LCLK-domain pulse
  input  logic        CLK,
  input  logic        RESET,
  input  logic        TX_EXT_EN,
  input  logic        HARD_TRIGGER,   // CLK-domain level
  output logic        DATA,
  output logic        DATA_VALID
);
  localparam int unsigned CW = $clog2(FRAME_BITS + 1);

  initial assert (FRAME_BITS >= 16 * N_WORDS)
    else $error("gem_tx_channel: FRAME_BITS too small for the TX words");

  logic [FRAME_BITS-1:0] shift_reg;
  logic [CW-1:0]         bit_counter;
  logic                  start_clk, hard_q, ext_en_s1, ext_en_s2, start;
  logic [FRAME_BITS-1:0] frame;

  gem_pulse_sync u_start_sync (
    .src_clk  (LCLK),
    .dst_clk  (CLK),
    .rst      (RESET),
    .src_pulse(GEM_TX_START),
    .dst_pulse(start_clk)
  );

  always_comb begin
    frame = '0;
    for (int i = 0; i < int'(N_WORDS); i++)
      frame[FRAME_BITS-1-16*i -: 16] = GEM_TX_WORD[i];
  end

  assign start = start_clk || (ext_en_s2 && HARD_TRIGGER && !hard_q);

  always_ff @(posedge CLK or posedge RESET) begin
    if (RESET) begin
      shift_reg   <= '0;
      bit_counter <= '0;
      DATA        <= 1'b0;
      DATA_VALID  <= 1'b0;
      hard_q      <= 1'b0;
      ext_en_s1   <= 1'b0;
      ext_en_s2   <= 1'b0;
    end else begin
      hard_q    <= HARD_TRIGGER;
      ext_en_s1 <= TX_EXT_EN;
      ext_en_s2 <= ext_en_s1;
      DATA      <= shift_reg[FRAME_BITS-1];
      if (bit_counter == '0) begin
        DATA_VALID <= 1'b0;
        if (start) begin
          bit_counter <= CW'(FRAME_BITS);
          shift_reg   <= frame;
        end
      end else begin
        DATA_VALID  <= 1'b1;
        bit_counter <= bit_counter - 1'b1;
        shift_reg   <= shift_reg << 1;
      end
    end
  end

endmodule
