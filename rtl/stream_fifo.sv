// stream_fifo: small on-chip elastic buffer.
//
// Used twice in the partition FIFO: as the read buffer between each drive
// and the RAID controller, which absorbs the drive's varying read
// latency, and as the prefetch cache inside each drive's DRAM-held write
// buffer (dram_fifo). It is an on-chip circular buffer of DEPTH words;
// keeping the read side on chip is this design's choice.
//
// Interface: valid/ready on both sides. A word is written when
// in_valid && in_ready and leaves when out_valid && out_ready; the output is
// first-word-fall-through (the head is visible while out_valid is high).
// Simultaneous read and write are allowed every cycle, including when full.
// level counts the words held. DEPTH must be a power of two.
module stream_fifo #(
  parameter int unsigned W     = 224,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [W-1:0]             in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [W-1:0]             out_data,
  output logic [$clog2(DEPTH):0]   level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign out_valid = (level != 0);
  assign in_ready  = (level < (AW+1)'(DEPTH)) || out_ready;
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;
  assign out_data  = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    level <= (AW+1)'(DEPTH));

endmodule
