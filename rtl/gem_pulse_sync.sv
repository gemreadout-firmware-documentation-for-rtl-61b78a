// gem_pulse_sync: carries single-cycle request pulses from one clock domain
// to another.
//
// Each source pulse flips a toggle flip-flop; the destination passes the
// toggle through two flip-flops and emits one destination-cycle pulse for
// every change it sees. Pulses must be at least three destination clocks
// apart to be counted separately. Used for the register-write requests
// (soft trigger, TX start, calibration start) that the local-bus clock hands
// to the MCLK-derived clocks. This crossing scheme is this design's own
// choice; the documentation only says that such crossings need care.
module gem_pulse_sync (
  input  logic src_clk,
  input  logic dst_clk,
  input  logic rst,        // asynchronous, active high
  input  logic src_pulse,
  output logic dst_pulse
);
  logic src_tgl;
  logic [2:0] dst_sync;

  always_ff @(posedge src_clk or posedge rst) begin
    if (rst) src_tgl <= 1'b0;
    else if (src_pulse) src_tgl <= ~src_tgl;
  end

  always_ff @(posedge dst_clk or posedge rst) begin
    if (rst) dst_sync <= '0;
    else dst_sync <= {dst_sync[1:0], src_tgl};
  end

  assign dst_pulse = dst_sync[2] ^ dst_sync[1];
endmodule
