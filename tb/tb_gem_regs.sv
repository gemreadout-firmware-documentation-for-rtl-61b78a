// tb_gem_regs: self-checking test of the local-bus register file.
//
// Drives one-cycle REG_WREN / REG_RDEN accesses on a 40 MHz LCLK and feeds
// the receive-channel status inputs with known values. Checked: reset values
// (hard trigger word LV1A, soft word 000), read-back of the trigger word and
// all twelve TX words, BOARDIDS and REVISION, the packing of FIFOSIZE,
// EVENTSIZE and the split event counter, the event-data windows and the
// FIFO pop each read of them causes, the one-cycle request pulses (soft
// trigger, TX start with TX_EXT_EN from bit 0, reset, calibration) and the
// two calibration modes (0xFFFF external, anything else one sequence), and
// that accesses without USR_ACCESS are ignored.
`timescale 1ns/1ps
module tb_gem_regs;
  import gem_pkg::*;
  int checks = 0, failures = 0;

  logic lclk = 0;
  always #12.5 lclk = ~lclk;

  logic        nlbres = 1, wren = 0, rden = 0, usr = 1;
  logic [15:0] addr = 0, din = 0, dout;
  rx_status_t  st [N_CH];
  logic        rd_size [N_CH], rd_data [N_CH];
  logic [15:0] txw [N_TX_WORDS];
  logic        tx_start, tx_ext, soft_trig, cfire, cext, reg_reset;
  logic [2:0]  hword, sword;

  gem_regs #(.REVISION(16'h1234)) dut (
    .LCLK(lclk), .nLBRES(nlbres), .REG_WREN(wren), .REG_RDEN(rden), .REG_ADDR(addr),
    .REG_DIN(din), .REG_DOUT(dout), .USR_ACCESS(usr), .IDD(3'd1), .IDE(3'd2), .IDF(3'd5),
    .RX_STATUS(st), .RD_EVENT_SIZE(rd_size), .RD_EVENT_DATA(rd_data),
    .GEM_TX_WORD(txw), .GEM_TX_START(tx_start), .GEM_TX_START_EXT_EN(tx_ext),
    .SOFT_TRIGGER(soft_trig), .HARD_TRIG_WORD(hword), .SOFT_TRIG_WORD(sword),
    .CALIB_FIRE(cfire), .CALIB_EXT(cext), .REG_RESET(reg_reset));

  // Count pulses and pops per channel.
  int n_tx = 0, n_soft = 0, n_cfire = 0, n_rst = 0;
  int pops_size [N_CH], pops_data [N_CH];
  always @(posedge lclk) begin
    if (tx_start) n_tx++;
    if (soft_trig) n_soft++;
    if (cfire) n_cfire++;
    if (reg_reset) n_rst++;
    for (int c = 0; c < N_CH; c++) begin
      if (rd_size[c]) pops_size[c]++;
      if (rd_data[c]) pops_data[c]++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic uwrite(input logic [15:0] a, input logic [15:0] d);
    @(negedge lclk); addr = a; din = d; wren = 1;
    @(negedge lclk); wren = 0;
    @(negedge lclk);
  endtask

  task automatic uread(input logic [15:0] a, output logic [15:0] d);
    @(negedge lclk); addr = a; rden = 1;
    @(negedge lclk); rden = 0; d = dout;
    @(negedge lclk);
  endtask

  initial begin
    logic [15:0] d;
    logic [15:0] w [N_TX_WORDS];
    for (int c = 0; c < N_CH; c++) begin
      pops_size[c] = 0; pops_data[c] = 0;
      st[c].event_size      = 4'(c + 1);
      st[c].event_count     = 6'(c + 40);
      st[c].event_data      = 16'hA000 + 16'(c);
      st[c].event_data_size = 10'(c * 70 + 3);
      st[c].events_sent     = 32'h0001_0000 * 32'(c + 1) + 32'(c * 3);
    end
    #3 nlbres = 0; #50 nlbres = 1;

    uread(A_GEM_TRIG_WORD, d);
    check(d == 16'h0020, $sformatf("TRIG_WORD reset value %h, expected 0020", d));
    check(hword == T1_LV1A && sword == 3'b000, "trigger words after reset");
    uwrite(A_GEM_TRIG_WORD, 16'h0026);
    check(hword == 3'b100 && sword == 3'b110, "TRIG_WORD 0x26 -> hard 100, soft 110");
    uread(A_GEM_TRIG_WORD, d);
    check(d == 16'h0026, "TRIG_WORD read back");

    uread(A_BOARDIDS, d);
    check(d == {7'b0, 3'd5, 3'd2, 3'd1}, "BOARDIDS");
    uread(A_REVISION, d);
    check(d == 16'h1234, "REVISION");

    for (int i = 0; i < N_TX_WORDS; i++) begin
      w[i] = 16'($urandom);
      uwrite(A_GEM_TX_WORD + 16'(2 * i), w[i]);
    end
    for (int i = 0; i < N_TX_WORDS; i++) begin
      check(txw[i] == w[i], $sformatf("TX word %0d output", i));
      uread(A_GEM_TX_WORD + 16'(2 * i), d);
      check(d == w[i], $sformatf("TX word %0d read back", i));
    end

    for (int c = 0; c < N_CH; c++) begin
      uread(A_GEM_FIFOSIZE + 16'(2 * c), d);
      check(d == {st[c].event_count, st[c].event_data_size}, $sformatf("FIFOSIZE %0d", c));
      uread(A_GEM_EVENTS_SENT_H + 16'(2 * c), d);
      check(d == st[c].events_sent[31:16], $sformatf("EVENTS_SENT_H %0d", c));
      uread(A_GEM_EVENTS_SENT_L + 16'(2 * c), d);
      check(d == st[c].events_sent[15:0], $sformatf("EVENTS_SENT_L %0d", c));
      uread(A_GEM_EVENTSIZE + 16'(2 * c), d);
      check(d == 16'(st[c].event_size), $sformatf("EVENTSIZE %0d", c));
      check(pops_size[c] == 1, $sformatf("EVENTSIZE read pops SizeFIFO %0d once", c));
      uread(A_GEM_EVENTDATA + 16'(256 * c) + 16'(2 * c), d);
      check(d == st[c].event_data, $sformatf("EVENTDATA window %0d", c));
      check(pops_data[c] == 1, $sformatf("EVENTDATA read pops DataFIFO %0d once", c));
    end
    check(pops_size.sum() == N_CH && pops_data.sum() == N_CH, "no pops on other channels");

    // request pulses
    uwrite(A_GEM_SOFT_TRIG, 16'h0);
    uwrite(A_GEM_SOFT_TRIG, 16'h0);
    check(n_soft == 2, "two soft-trigger pulses");
    uwrite(A_GEM_TX_START, 16'h0);
    check(n_tx == 1 && !tx_ext, "TX start pulse, TX_EXT_EN low");
    uwrite(A_GEM_TX_START, 16'h1);
    check(n_tx == 2 && tx_ext, "TX start pulse, TX_EXT_EN high");
    uwrite(A_RESET, 16'h1);
    check(n_rst == 1, "reset request pulse");

    // calibration
    uwrite(A_GEM_CALIB_START, 16'h0005);
    check(n_cfire == 1 && !cext, "calibration write fires one sequence");
    uwrite(A_GEM_CALIB_START, 16'hFFFF);
    check(n_cfire == 1 && cext, "0xFFFF selects external calibration");
    uread(A_GEM_CALIB_START, d);
    check(d == 16'hFFFF, "CALIB_START read back");
    uwrite(A_GEM_CALIB_START, 16'h0000);
    check(n_cfire == 2 && !cext, "other value leaves external mode and fires");

    // no access without USR_ACCESS
    usr = 0;
    uwrite(A_GEM_TRIG_WORD, 16'h0001);
    uwrite(A_GEM_SOFT_TRIG, 16'h0);
    uread(A_GEM_EVENTSIZE, d);
    usr = 1;
    check(hword == 3'b100 && sword == 3'b110 && n_soft == 2 && pops_size[0] == 1,
          "accesses ignored without USR_ACCESS");

    // unmapped address reads zero
    uread(16'h0100, d);
    check(d == 16'h0000, "unmapped address reads 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
