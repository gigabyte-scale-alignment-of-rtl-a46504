// partition_fifo: the FIFO that stitches one partition's output to the
// next partition's input, built on drive storage.
//
// While a partition is scored, its last PE emits one link word (28 bytes)
// per reference row and, at the same time, its first PE consumes the link
// word the previous partition's last PE emitted for that row. For
// gigabyte-scale references this is tens of gigabytes per partition, so the
// FIFO is not a memory on the chip but a set of solid-state drives behind
// SATA cores. This module is the on-chip part of that storage system: a
// RAID controller (raid_ctrl) that stripes the stream over one half of the
// drives and reads the other half back, and per drive a write buffer kept
// in off-chip DRAM (dram_fifo) and an on-chip read buffer (stream_fifo),
// which absorb the drives' varying latencies.
//
// Interface and timing:
//   part_start/wr_half/wr_active/rd_active  open a partition (see raid_ctrl).
//   wr_*       write side, valid/ready, one link word per accepted cycle.
//   rd_*       read side, valid/ready, words in the order written during
//              the previous partition.
//   flushed    every write buffer is empty and no command is pending: all
//              data of the partition has been handed to the drives, and the
//              next partition may open.
//   drv_*      one SATA-core stream port per drive (command, write, read).
//   dbuf_*     one DRAM channel per drive for its write buffer (see
//              dram_fifo); a DRAM controller outside this design serves
//              them. Addresses are relative to the drive's own region.
// N_DRIVES defaults to 2: the two serial transceivers of the prototype
// board give two SATA cores, one per half. The drive command format, the
// buffer depths and the DRAM ring size are this design's choices.
module partition_fifo
  import dialign_pkg::*;
#(
  parameter int unsigned N_DRIVES  = 2,
  parameter int unsigned STRIPE    = 16,
  parameter int unsigned BUF_DEPTH = 64,
  parameter int unsigned RING_DEPTH  = 1048576,
  parameter int unsigned CACHE_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                part_start,
  input  logic                wr_half,
  input  logic                wr_active,
  input  logic                rd_active,
  output logic                flushed,
  input  logic                wr_valid,
  output logic                wr_ready,
  input  link_t               wr_data,
  output logic                rd_valid,
  input  logic                rd_ready,
  output link_t               rd_data,
  output logic [N_DRIVES-1:0] drv_cmd_valid,
  output logic [N_DRIVES-1:0] drv_cmd_write,
  input  logic [N_DRIVES-1:0] drv_cmd_ready,
  output logic [N_DRIVES-1:0] drv_wr_valid,
  input  logic [N_DRIVES-1:0] drv_wr_ready,
  output link_t               drv_wr_data [N_DRIVES],
  input  logic [N_DRIVES-1:0] drv_rd_valid,
  output logic [N_DRIVES-1:0] drv_rd_ready,
  input  link_t               drv_rd_data [N_DRIVES],
  output logic [N_DRIVES-1:0] dbuf_wr_valid,
  input  logic [N_DRIVES-1:0] dbuf_wr_ready,
  output word_t               dbuf_wr_addr [N_DRIVES],
  output link_t               dbuf_wr_data [N_DRIVES],
  output logic [N_DRIVES-1:0] dbuf_rd_valid,
  input  logic [N_DRIVES-1:0] dbuf_rd_ready,
  output word_t               dbuf_rd_addr [N_DRIVES],
  input  logic [N_DRIVES-1:0] dbuf_rd_resp_valid,
  input  link_t               dbuf_rd_resp_data [N_DRIVES]
);

  localparam int unsigned LVW = $clog2(BUF_DEPTH) + 1;

  logic                cmd_busy;
  logic [N_DRIVES-1:0] wb_in_valid, wb_in_ready;
  logic [LINK_W-1:0]   wb_in_data;
  logic [N_DRIVES-1:0] rb_out_valid, rb_out_ready;
  logic [LINK_W-1:0]   rb_out_data [N_DRIVES];
  logic [N_DRIVES-1:0] wb_empty;
  logic [LINK_W-1:0]   rd_word;

  raid_ctrl #(
    .N_DRIVES (N_DRIVES),
    .W        (LINK_W),
    .STRIPE   (STRIPE)
  ) u_raid (
    .clk           (clk),
    .rst_n         (rst_n),
    .part_start    (part_start),
    .wr_half       (wr_half),
    .wr_active     (wr_active),
    .rd_active     (rd_active),
    .cmd_busy      (cmd_busy),
    .in_valid      (wr_valid),
    .in_ready      (wr_ready),
    .in_data       (wr_data),
    .out_valid     (rd_valid),
    .out_ready     (rd_ready),
    .out_data      (rd_word),
    .drv_cmd_valid (drv_cmd_valid),
    .drv_cmd_write (drv_cmd_write),
    .drv_cmd_ready (drv_cmd_ready),
    .drv_wr_valid  (wb_in_valid),
    .drv_wr_ready  (wb_in_ready),
    .drv_wr_data   (wb_in_data),
    .drv_rd_valid  (rb_out_valid),
    .drv_rd_ready  (rb_out_ready),
    .drv_rd_data   (rb_out_data)
  );

  assign rd_data = link_t'(rd_word);

  for (genvar d = 0; d < N_DRIVES; d++) begin : g_drv
    logic [LVW-1:0]    rb_level;
    logic [LINK_W-1:0] wb_out_data, wb_mem_data;

    dram_fifo #(.W(LINK_W), .RING_DEPTH(RING_DEPTH), .CACHE_DEPTH(CACHE_DEPTH)) u_wbuf (
      .clk               (clk),
      .rst_n             (rst_n),
      .in_valid          (wb_in_valid[d]),
      .in_ready          (wb_in_ready[d]),
      .in_data           (wb_in_data),
      .out_valid         (drv_wr_valid[d]),
      .out_ready         (drv_wr_ready[d]),
      .out_data          (wb_out_data),
      .empty             (wb_empty[d]),
      .mem_wr_valid      (dbuf_wr_valid[d]),
      .mem_wr_ready      (dbuf_wr_ready[d]),
      .mem_wr_addr       (dbuf_wr_addr[d]),
      .mem_wr_data       (wb_mem_data),
      .mem_rd_valid      (dbuf_rd_valid[d]),
      .mem_rd_ready      (dbuf_rd_ready[d]),
      .mem_rd_addr       (dbuf_rd_addr[d]),
      .mem_rd_resp_valid (dbuf_rd_resp_valid[d]),
      .mem_rd_resp_data  (dbuf_rd_resp_data[d])
    );
    assign drv_wr_data[d]  = link_t'(wb_out_data);
    assign dbuf_wr_data[d] = link_t'(wb_mem_data);

    stream_fifo #(.W(LINK_W), .DEPTH(BUF_DEPTH)) u_rbuf (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (drv_rd_valid[d]),
      .in_ready  (drv_rd_ready[d]),
      .in_data   (drv_rd_data[d]),
      .out_valid (rb_out_valid[d]),
      .out_ready (rb_out_ready[d]),
      .out_data  (rb_out_data[d]),
      .level     (rb_level)
    );
  end

  assign flushed = (&wb_empty) && !cmd_busy;

endmodule
