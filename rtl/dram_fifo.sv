// dram_fifo: a drive's write buffer, kept in a ring of off-chip DRAM.
//
// Drives do not accept data at a steady rate, so the words bound for a drive
// are first parked in DRAM and handed to the drive when it is ready. This
// module is the buffer manager: it owns a ring of RING_DEPTH words in its
// own DRAM region (addresses 0 .. RING_DEPTH-1 of the mem_* channel), writes
// every accepted word at the ring's tail, and reads the ring's head back
// into a small on-chip prefetch cache (stream_fifo, CACHE_DEPTH words) that
// feeds the drive. A read is only issued when the cache has room for its
// response, so responses never need backpressure. A ring slot is reused
// only after its read response has returned.
//
// Interface and timing:
//   in_*           write side, valid/ready. in_ready is low when the ring
//                  is full or the DRAM write channel is not ready.
//   out_*          read side (to the drive), valid/ready, first-word
//                  fall-through from the cache, words in write order.
//   empty          nothing is held in DRAM, in flight or in the cache.
//   mem_wr_*       DRAM write channel, valid/ready, one word per accept.
//   mem_rd_*       DRAM read request channel, valid/ready.
//   mem_rd_resp_*  DRAM read data, in request order, any latency, no
//                  backpressure.
// The DRAM controller behind mem_* must complete an accepted write before
// any read it accepts later. A word can leave at the earliest 3 cycles plus
// the DRAM read latency after it entered; the sustained rate is one word
// per cycle when CACHE_DEPTH exceeds the read latency and both channels
// take a word every cycle.
//
// Keeping this buffer in DRAM follows the description (Section 4: varying
// drive latencies need a buffer managed in DRAM). The DRAM controller and
// the processor that manages it there are outside this design; ring size,
// cache depth and channel protocol are this design's choices.
module dram_fifo
  import dialign_pkg::*;
#(
  parameter int unsigned W           = 224,
  parameter int unsigned RING_DEPTH  = 1048576,
  parameter int unsigned CACHE_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         empty,
  output logic         mem_wr_valid,
  input  logic         mem_wr_ready,
  output word_t        mem_wr_addr,
  output logic [W-1:0] mem_wr_data,
  output logic         mem_rd_valid,
  input  logic         mem_rd_ready,
  output word_t        mem_rd_addr,
  input  logic         mem_rd_resp_valid,
  input  logic [W-1:0] mem_rd_resp_data
);

  localparam int unsigned RW = $clog2(RING_DEPTH) + 1;
  localparam int unsigned CW = $clog2(CACHE_DEPTH) + 1;

  logic [RW-1:0] used;       // ring slots not yet freed (written, not returned)
  logic [RW-1:0] unread;     // words written whose read is not yet issued
  logic [RW-1:0] head, tail; // ring addresses of next read and next write
  logic [CW-1:0] inflight;   // reads issued whose response has not arrived
  logic [CW-1:0] cache_level;
  logic          do_wr, do_rd, cache_in_ready;

  assign mem_wr_valid = in_valid && (used != RW'(RING_DEPTH));
  assign in_ready     = mem_wr_ready && (used != RW'(RING_DEPTH));
  assign mem_wr_addr  = word_t'(tail);
  assign mem_wr_data  = in_data;
  assign do_wr        = mem_wr_valid && mem_wr_ready;

  assign mem_rd_valid = (unread != '0) &&
                        ((CW+1)'(inflight) + (CW+1)'(cache_level) < (CW+1)'(CACHE_DEPTH));
  assign mem_rd_addr  = word_t'(head);
  assign do_rd        = mem_rd_valid && mem_rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used     <= '0;
      unread   <= '0;
      head     <= '0;
      tail     <= '0;
      inflight <= '0;
    end else begin
      if (do_wr) tail <= (tail == RW'(RING_DEPTH - 1)) ? '0 : tail + 1'b1;
      if (do_rd) head <= (head == RW'(RING_DEPTH - 1)) ? '0 : head + 1'b1;
      used     <= used + RW'(do_wr) - RW'(mem_rd_resp_valid);
      unread   <= unread + RW'(do_wr) - RW'(do_rd);
      inflight <= inflight + CW'(do_rd) - CW'(mem_rd_resp_valid);
    end
  end

  stream_fifo #(.W(W), .DEPTH(CACHE_DEPTH)) u_cache (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (mem_rd_resp_valid),
    .in_ready  (cache_in_ready),
    .in_data   (mem_rd_resp_data),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  (out_data),
    .level     (cache_level)
  );

  assign empty = (used == '0) && (cache_level == '0);

  a_cache_room: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rd_resp_valid |-> (cache_in_ready && inflight != '0));

endmodule
