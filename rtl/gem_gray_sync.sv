// gem_gray_sync: moves a counter that steps by at most one per source clock
// into another clock domain.
//
// The source value is registered in Gray code, so only one bit changes per
// step; the destination passes it through two flip-flops and converts it
// back to binary. The destination sees the count three to four of its
// clocks late but never a torn value. Used to read the per-channel event
// counters (kept in the MCLK domain) from the local-bus clock. This crossing
// scheme is this design's own choice.
module gem_gray_sync #(
  parameter int unsigned W = 32
) (
  input  logic         src_clk,
  input  logic         dst_clk,
  input  logic         rst,     // asynchronous, active high
  input  logic [W-1:0] src_bin,
  output logic [W-1:0] dst_bin
);
  logic [W-1:0] src_g, dst_g1, dst_g2;

  always_ff @(posedge src_clk or posedge rst) begin
    if (rst) src_g <= '0;
    else src_g <= src_bin ^ (src_bin >> 1);
  end

  always_ff @(posedge dst_clk or posedge rst) begin
    if (rst) begin
      dst_g1 <= '0;
      dst_g2 <= '0;
    end else begin
      dst_g1 <= src_g;
      dst_g2 <= dst_g1;
    end
  end

  always_comb begin
    dst_bin[W-1] = dst_g2[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) dst_bin[i] = dst_bin[i+1] ^ dst_g2[i];
  end
endmodule
