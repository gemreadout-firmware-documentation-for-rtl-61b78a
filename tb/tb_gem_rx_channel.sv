// tb_gem_rx_channel: self-checking test of one VFAT receive channel.
//
// A serial source sends events (DATA MSB first while DATA_VALID is high) on
// a 30 ns CLK; the reader pops the FIFOs on a 25 ns LCLK. Checked: every
// stored word and every per-event word count against a reference model,
// the fill counts, the event counter, that a trailing partial word is
// discarded, that words and sizes are dropped once the SizeFIFO is full
// while events are still counted, and that RESET clears everything.
`timescale 1ns/1ps
module tb_gem_rx_channel;
  int checks = 0, failures = 0;

  logic lclk = 0, clk = 0;
  always #12.5 lclk = ~lclk;
  always #15   clk  = ~clk;

  logic        reset = 1, data = 0, dv = 0;
  logic        rd_size = 0, rd_data = 0;
  logic [3:0]  ev_size;
  logic [5:0]  ev_count;
  logic [15:0] ev_data;
  logic [9:0]  ev_data_size;
  logic [31:0] ev_sent;

  gem_rx_channel dut (
    .LCLK(lclk), .RD_EVENT_SIZE(rd_size), .EVENT_SIZE(ev_size), .EVENT_COUNT(ev_count),
    .RD_EVENT_DATA(rd_data), .EVENT_DATA(ev_data), .EVENT_DATA_SIZE(ev_data_size),
    .GEM_EVENTS_SENT(ev_sent), .CLK(clk), .RESET(reset), .DATA(data), .DATA_VALID(dv));

  logic [15:0] wref[$];
  logic [3:0]  sref[$];
  int          sent = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Send one event of nwords words plus extra_bits trailing bits.
  task automatic send_event(input int nwords, input int extra_bits, input bit expect_stored);
    logic [15:0] w;
    for (int i = 0; i < nwords; i++) begin
      w = 16'($urandom);
      if (expect_stored) wref.push_back(w);
      for (int b = 15; b >= 0; b--) begin
        @(negedge clk); dv = 1; data = w[b];
      end
    end
    for (int b = 0; b < extra_bits; b++) begin
      @(negedge clk); dv = 1; data = 1'($urandom);
    end
    @(negedge clk); dv = 0; data = 0;
    if (expect_stored) sref.push_back(4'(nwords));
    sent++;
    repeat ($urandom_range(3, 1)) @(negedge clk);
  endtask

  task automatic settle();
    repeat (8) @(posedge lclk);
  endtask

  task automatic drain_and_check();
    int n;
    settle();
    check(ev_count == 6'(sref.size()), $sformatf("EVENT_COUNT %0d exp %0d", ev_count, sref.size()));
    check(ev_data_size == 10'(wref.size()), $sformatf("EVENT_DATA_SIZE %0d exp %0d", ev_data_size, wref.size()));
    check(ev_sent == 32'(sent), $sformatf("GEM_EVENTS_SENT %0d exp %0d", ev_sent, sent));
    while (sref.size() > 0) begin
      n = int'(sref.pop_front());
      @(negedge lclk);
      check(ev_size == 4'(n), $sformatf("EVENT_SIZE %0d exp %0d", ev_size, n));
      rd_size = 1; @(negedge lclk); rd_size = 0;
      for (int i = 0; i < n; i++) begin
        check(ev_data == wref[0], $sformatf("EVENT_DATA %h exp %h", ev_data, wref[0]));
        void'(wref.pop_front());
        rd_data = 1; @(negedge lclk); rd_data = 0;
      end
    end
    settle();
    check(ev_count == 0 && ev_data_size == 0, "FIFOs empty after readout");
  endtask

  initial begin
    #100 reset = 0;
    #100;
    // events of 12 words (a VFAT2 packet), 14 words (the debug frame), random
    send_event(12, 0, 1);
    send_event(14, 0, 1);
    send_event(1, 0, 1);
    send_event(3, 7, 1);     // trailing partial word discarded
    for (int e = 0; e < 6; e++) send_event($urandom_range(15, 1), 0, 1);
    drain_and_check();

    // overflow of the SizeFIFO: 64 events stored, the rest dropped
    for (int e = 0; e < 64; e++) send_event(1, 0, 1);
    for (int e = 0; e < 4; e++) send_event(2, 0, 0);
    settle();
    check(ev_count == 0, "SizeFIFO full: 64 entries read back as fill count 0");
    drain_and_check();

    // reset clears counters and FIFOs
    send_event(5, 0, 1);
    settle();
    check(ev_data_size == 5, "data present before reset");
    @(negedge lclk); reset = 1; #100; reset = 0;
    wref.delete(); sref.delete(); sent = 0;
    settle();
    check(ev_count == 0 && ev_data_size == 0 && ev_sent == 0, "RESET clears FIFOs and counter");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
