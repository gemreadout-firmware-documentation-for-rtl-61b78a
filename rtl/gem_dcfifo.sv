// gem_dcfifo: dual-clock FIFO for the receive path (DataFIFO and SizeFIFO).
//
// Behaves like the dual-clock FIFO the firmware uses: a write request stores
// `data` unless the FIFO is full, in which case it is ignored; a read request
// removes the oldest word unless the FIFO is empty. The read side is
// show-ahead: `q` always shows the oldest word, and `rdreq` advances it.
// The default sizes are those of the DataFIFO (1024 x 16, 10-bit fill
// count); the SizeFIFO instance uses 64 x 4 with a 6-bit fill count.
//
// How it works (this design's own choice, the documentation gives only the
// behaviour): a memory array with binary read/write pointers one bit wider
// than the address. Each pointer is passed to the other clock domain in Gray
// code through two flip-flops. Full and the write-side fill count are
// computed in the write domain, empty and the read-side fill count in the
// read domain; both are conservative (a word becomes visible to the reader
// about three read clocks after it is written).
//
// Fill counts are USEDW_W bits wide, as in the documentation, so a
// completely full FIFO of 2**USEDW_W words reads back as 0 there; `wrfull`
// tells the cases apart. `aclr` clears both sides asynchronously.
module gem_dcfifo #(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned USEDW_W = 10
) (
  input  logic               aclr,
  // write side
  input  logic               wrclk,
  input  logic               wrreq,
  input  logic [WIDTH-1:0]   data,
  output logic               wrfull,
  output logic [USEDW_W-1:0] wrusedw,
  // read side
  input  logic               rdclk,
  input  logic               rdreq,
  output logic [WIDTH-1:0]   q,
  output logic               rdempty,
  output logic [USEDW_W-1:0] rdusedw
);
  localparam int unsigned AW = $clog2(DEPTH);

  initial begin
    assert (DEPTH == (1 << AW)) else $error("gem_dcfifo: DEPTH must be a power of two");
    assert (USEDW_W == AW) else $error("gem_dcfifo: USEDW_W must be log2(DEPTH)");
  end

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr, rptr;            // binary pointers
  logic [AW:0] wptr_g, rptr_g;        // Gray pointers, registered
  logic [AW:0] rptr_g_w1, rptr_g_w2;  // read pointer synchronised to write side
  logic [AW:0] wptr_g_r1, wptr_g_r2;  // write pointer synchronised to read side
  logic [AW:0] rptr_w, wptr_r;        // synchronised pointers in binary

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic wr_ok;
  assign rptr_w  = gray2bin(rptr_g_w2);
  assign wrfull  = (wptr[AW] != rptr_w[AW]) && (wptr[AW-1:0] == rptr_w[AW-1:0]);
  assign wr_ok   = wrreq && !wrfull;
  assign wrusedw = USEDW_W'(wptr - rptr_w);

  always_ff @(posedge wrclk) begin
    if (wr_ok) mem[wptr[AW-1:0]] <= data;
  end

  always_ff @(posedge wrclk or posedge aclr) begin
    if (aclr) begin
      wptr      <= '0;
      wptr_g    <= '0;
      rptr_g_w1 <= '0;
      rptr_g_w2 <= '0;
    end else begin
      rptr_g_w1 <= rptr_g;
      rptr_g_w2 <= rptr_g_w1;
      if (wr_ok) begin
        wptr   <= wptr + 1'b1;
        wptr_g <= bin2gray(wptr + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  logic rd_ok;
  assign wptr_r  = gray2bin(wptr_g_r2);
  assign rdempty = (rptr == wptr_r);
  assign rd_ok   = rdreq && !rdempty;
  assign rdusedw = USEDW_W'(wptr_r - rptr);
  assign q       = mem[rptr[AW-1:0]];

  always_ff @(posedge rdclk or posedge aclr) begin
    if (aclr) begin
      rptr      <= '0;
      rptr_g    <= '0;
      wptr_g_r1 <= '0;
      wptr_g_r2 <= '0;
    end else begin
      wptr_g_r1 <= wptr_g;
      wptr_g_r2 <= wptr_g_r1;
      if (rd_ok) begin
        rptr   <= rptr + 1'b1;
        rptr_g <= bin2gray(rptr + 1'b1);
      end
    end
  end

endmodule
