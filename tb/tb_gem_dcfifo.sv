// tb_gem_dcfifo: self-checking test of the dual-clock FIFO in both of its
// configurations, DataFIFO (1024 x 16) and SizeFIFO (64 x 4).
//
// Write and read clocks are unrelated (10 ns and 13 ns). Each FIFO is checked
// for: order and content of the words against a reference queue under
// random simultaneous writes and reads; fill counts after the pointers have
// settled; the full flag and the dropping of a write to a full FIFO; and
// the empty flag after draining.
`timescale 1ns/1ps
module tb_gem_dcfifo;
  int checks = 0, failures = 0;

  logic wclk = 0, rclk = 0, aclr = 1;
  always #5   wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  // DataFIFO configuration
  logic        d_wr, d_rd, d_full, d_empty;
  logic [15:0] d_din, d_q;
  logic [9:0]  d_wused, d_rused;
  gem_dcfifo #(.WIDTH(16), .DEPTH(1024), .USEDW_W(10)) dut_d (
    .aclr(aclr), .wrclk(wclk), .wrreq(d_wr), .data(d_din), .wrfull(d_full), .wrusedw(d_wused),
    .rdclk(rclk), .rdreq(d_rd), .q(d_q), .rdempty(d_empty), .rdusedw(d_rused));

  // SizeFIFO configuration
  logic       s_wr, s_rd, s_full, s_empty;
  logic [3:0] s_din, s_q;
  logic [5:0] s_wused, s_rused;
  gem_dcfifo #(.WIDTH(4), .DEPTH(64), .USEDW_W(6)) dut_s (
    .aclr(aclr), .wrclk(wclk), .wrreq(s_wr), .data(s_din), .wrfull(s_full), .wrusedw(s_wused),
    .rdclk(rclk), .rdreq(s_rd), .q(s_q), .rdempty(s_empty), .rdusedw(s_rused));

  logic [15:0] dref[$];
  logic [3:0]  sref[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Writer: random writes for a number of cycles, mirrored in the queues.
  task automatic write_phase(input int cycles, input int pct);
    repeat (cycles) begin
      @(negedge wclk);
      d_wr  = ($urandom_range(99) < pct);
      s_wr  = d_wr;
      d_din = 16'($urandom);
      s_din = 4'($urandom);
      @(posedge wclk);
      if (d_wr && !d_full) dref.push_back(d_din);
      if (s_wr && !s_full) sref.push_back(s_din);
    end
    @(negedge wclk);
    d_wr = 0; s_wr = 0;
  endtask

  // Reader: random reads, each compared with the reference queue.
  task automatic read_phase(input int cycles, input int pct);
    repeat (cycles) begin
      @(negedge rclk);
      d_rd = ($urandom_range(99) < pct) && !d_empty;
      s_rd = ($urandom_range(99) < pct) && !s_empty;
      if (d_rd) check(dref.size() > 0 && d_q == dref.pop_front(), "DataFIFO word order/content");
      if (s_rd) check(sref.size() > 0 && s_q == sref.pop_front(), "SizeFIFO word order/content");
      @(posedge rclk);
    end
    @(negedge rclk);
    d_rd = 0; s_rd = 0;
  endtask

  initial begin
    d_wr = 0; d_rd = 0; s_wr = 0; s_rd = 0; d_din = 0; s_din = 0;
    #40 aclr = 0;
    #40;
    check(d_empty && s_empty && !d_full && !s_full, "empty after clear");

    // concurrent traffic
    fork
      write_phase(400, 50);
      read_phase(400, 60);
    join
    read_phase(300, 100);
    repeat (6) @(posedge rclk);
    read_phase(50, 100);
    check(dref.size() == 0 && sref.size() == 0, "all written words read back");
    check(d_empty && s_empty, "empty after draining");

    // fill the SizeFIFO to full, then the DataFIFO
    write_phase(100, 100);
    repeat (6) @(posedge wclk);
    check(s_full, "SizeFIFO full after 64 writes");
    check(sref.size() == 64, "SizeFIFO accepted exactly 64 words");
    repeat (6) @(posedge rclk);
    check(s_rused == 6'(sref.size()), "SizeFIFO read fill count (64 wraps to 0)");
    check(d_rused == 10'(dref.size()), "DataFIFO read fill count");
    check(d_wused == 10'(dref.size()), "DataFIFO write fill count");
    write_phase(1000, 100);
    repeat (6) @(posedge wclk);
    check(d_full, "DataFIFO full after 1024 writes");
    check(dref.size() == 1024, "DataFIFO accepted exactly 1024 words");
    // extra write must be ignored
    @(negedge wclk); d_wr = 1; d_din = 16'hDEAD; @(negedge wclk); d_wr = 0;
    read_phase(1100, 100);
    repeat (6) @(posedge rclk);
    read_phase(20, 100);
    check(dref.size() == 0 && sref.size() == 0, "full FIFOs drained in order");
    check(d_empty && s_empty, "empty at end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
