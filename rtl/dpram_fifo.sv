// dpram_fifo: dual-clock acquisition buffer on a dual-port RAM.
//
// Words written in the acquisition clock domain (wclk) are read in the local
// bus clock domain (rclk). Read and write pointers are one bit wider than the
// address and cross domains as Gray code through two-flip-flop synchronizers,
// the usual asynchronous FIFO scheme. The read side is first-word-fall-
// through: while `rd_empty` is low, `rd_data` holds the oldest word, and
// `rd_en` removes it; the next word is there on the following rclk cycle.
// The RAM is read on every rclk edge at the next read pointer, which keeps a
// registered (block-RAM style) read port.
//
// `wr_free` (write side) and `rd_count` (read side) are conservative fill
// levels: each side sees the other's pointer two to three cycles late.
//
// From the source: an internal dual-port RAM from which the PCI 9056 moves
// data by DMA, with a 16 kB buffer (4096 32-bit words). The FIFO
// organisation is this design's choice.
module dpram_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4096   // power of two
) (
  input  logic                       wclk,
  input  logic                       wrst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  output logic                       wr_full,
  output logic [$clog2(DEPTH):0]     wr_free,
  input  logic                       rclk,
  input  logic                       rrst_n,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       rd_empty,
  output logic [$clog2(DEPTH):0]     rd_count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---- pointers ----
  logic [AW:0] wptr, wptr_g, rptr_g_w1, rptr_g_w2, rptr_w;
  logic [AW:0] rptr, rptr_g, rptr_n, wptr_g_r1, wptr_g_r2, wptr_r;
  logic        pop;

  // ---- write side ----
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr      <= '0;
      wptr_g    <= '0;
      rptr_g_w1 <= '0;
      rptr_g_w2 <= '0;
    end else begin
      rptr_g_w1 <= rptr_g;
      rptr_g_w2 <= rptr_g_w1;
      if (wr_en && !wr_full) begin
        wptr   <= wptr + 1'b1;
        wptr_g <= bin2gray(wptr + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wr_full) mem[wptr[AW-1:0]] <= wr_data;
  end

  assign rptr_w  = gray2bin(rptr_g_w2);
  assign wr_free = (AW+1)'(DEPTH) - (wptr - rptr_w);
  assign wr_full = (wptr - rptr_w) == (AW+1)'(DEPTH);

  // ---- read side ----

  assign wptr_r   = gray2bin(wptr_g_r2);
  assign rd_count = wptr_r - rptr;
  assign rd_empty = (rd_count == '0);
  assign pop      = rd_en && !rd_empty;
  assign rptr_n   = rptr + (AW+1)'(pop);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr      <= '0;
      rptr_g    <= '0;
      wptr_g_r1 <= '0;
      wptr_g_r2 <= '0;
    end else begin
      wptr_g_r1 <= wptr_g;
      wptr_g_r2 <= wptr_g_r1;
      rptr      <= rptr_n;
      rptr_g    <= bin2gray(rptr_n);
    end
  end

  always_ff @(posedge rclk) begin
    rd_data <= mem[rptr_n[AW-1:0]];
  end

endmodule
