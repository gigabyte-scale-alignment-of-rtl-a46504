// dialign_top: partitioned systolic alignment accelerator with a
// drive-backed partition FIFO.
//
// A query sequence is aligned against a streamed reference sequence by a
// linear array of N_PE PEs, each holding one query character. Queries
// longer than the array are cut into partitions of N_PE columns that reuse
// the array one after another. The seven-word link that the last PE emits
// for every reference row is the input of the first PE for the same row in
// the next partition; it is kept in a partition FIFO striped over solid-
// state drives (two halves that swap read and write roles per partition).
// At the end of each partition the PE end states go to the
// Partition-State-Storage, and after the last partition the retrieval
// module turns them into query-to-reference mappings.
//
//   query memory --> partition_ctrl --> pe_array --> partition_fifo --> drives
//   reference    -->      |        <-- (rows of the next partition) <--
//                         +--> pss (on chip, spill to DRAM) --> darm --> aln_*
//
// Outside this design, and reached through ports: the query memory, the
// reference source (drive or network), the SATA cores with their drives
// (drv_*), and the DRAM controller, which serves the PSS spill region
// (pss_dram_*) and one write-buffer ring per drive (dbuf_*).
// Timing: start pulses with qlen/rlen/threshold stable until done. The
// array scores N_PE cells per cycle while neither side of the FIFO holds it
// up; the run/stall counters report how much the drives slowed it down.
module dialign_top
  import dialign_pkg::*;
#(
  parameter int unsigned N_PE             = 100,
  parameter int unsigned N_DRIVES         = 2,
  parameter int unsigned STRIPE           = 16,
  parameter int unsigned BUF_DEPTH        = 64,
  parameter int unsigned DBUF_RING_DEPTH  = 1048576,
  parameter int unsigned DBUF_CACHE_DEPTH = 16,
  parameter int unsigned PSS_ONCHIP_DEPTH = 1600
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  word_t               qlen,
  input  word_t               rlen,
  input  score_t              threshold,
  output logic                busy,
  output logic                done,
  output word_t               partitions,
  output word_t               run_cycles,
  output word_t               in_stall_cycles,
  output word_t               out_stall_cycles,
  // query memory
  output logic                q_req_valid,
  output word_t               q_req_addr,
  input  logic                q_resp_valid,
  input  char_t               q_resp_char,
  // reference stream
  input  logic                ref_valid,
  output logic                ref_ready,
  input  char_t               ref_char,
  // SATA-core drive ports
  output logic [N_DRIVES-1:0] drv_cmd_valid,
  output logic [N_DRIVES-1:0] drv_cmd_write,
  input  logic [N_DRIVES-1:0] drv_cmd_ready,
  output logic [N_DRIVES-1:0] drv_wr_valid,
  input  logic [N_DRIVES-1:0] drv_wr_ready,
  output link_t               drv_wr_data [N_DRIVES],
  input  logic [N_DRIVES-1:0] drv_rd_valid,
  output logic [N_DRIVES-1:0] drv_rd_ready,
  input  link_t               drv_rd_data [N_DRIVES],
  // off-chip DRAM, one channel per drive for its write buffer
  output logic [N_DRIVES-1:0] dbuf_wr_valid,
  input  logic [N_DRIVES-1:0] dbuf_wr_ready,
  output word_t               dbuf_wr_addr [N_DRIVES],
  output link_t               dbuf_wr_data [N_DRIVES],
  output logic [N_DRIVES-1:0] dbuf_rd_valid,
  input  logic [N_DRIVES-1:0] dbuf_rd_ready,
  output word_t               dbuf_rd_addr [N_DRIVES],
  input  logic [N_DRIVES-1:0] dbuf_rd_resp_valid,
  input  link_t               dbuf_rd_resp_data [N_DRIVES],
  // off-chip DRAM for the PSS spill region
  output logic                pss_dram_wr_valid,
  input  logic                pss_dram_wr_ready,
  output word_t               pss_dram_wr_addr,
  output pe_state_t           pss_dram_wr_data,
  output logic                pss_dram_rd_valid,
  input  logic                pss_dram_rd_ready,
  output word_t               pss_dram_rd_addr,
  input  logic                pss_dram_rd_resp_valid,
  input  pe_state_t           pss_dram_rd_resp_data,
  // rows leaving the last partition (best score of each reference row)
  output logic                row_valid,
  output link_t               row_link,
  // alignment output
  output logic                aln_valid,
  output word_t               aln_query_pos,
  output word_t               aln_ref_pos,
  output score_t              aln_score,
  output word_t               hits,
  output score_t              best_score,
  output word_t               best_query_pos,
  output word_t               best_ref_pos
);

  // array
  logic      arr_en, arr_clear, arr_q_shift, arr_q_active;
  char_t     arr_q_char;
  word_t     arr_q_col;
  logic      arr_in_valid, arr_out_valid;
  link_t     arr_in_link, arr_out_link;
  logic      arr_st_capture, arr_st_shift;
  pe_state_t arr_state_out;
  // partition FIFO
  logic      pf_part_start, pf_wr_half, pf_wr_active, pf_rd_active, pf_flushed;
  logic      pf_wr_valid, pf_wr_ready, pf_rd_valid, pf_rd_ready;
  link_t     pf_wr_data, pf_rd_data;
  // PSS
  logic      pss_wr_valid, pss_wr_ready;
  word_t     pss_wr_addr;
  pe_state_t pss_wr_data;
  logic      pss_rd_req_valid, pss_rd_req_ready, pss_rd_resp_valid;
  word_t     pss_rd_req_addr;
  pe_state_t pss_rd_resp_data;
  // retrieval
  logic      darm_start, darm_done, darm_busy;
  word_t     darm_n_records;

  partition_ctrl #(.N_PE(N_PE)) u_ctrl (
    .clk              (clk),
    .rst_n            (rst_n),
    .start            (start),
    .qlen             (qlen),
    .rlen             (rlen),
    .busy             (busy),
    .done             (done),
    .partitions       (partitions),
    .run_cycles       (run_cycles),
    .in_stall_cycles  (in_stall_cycles),
    .out_stall_cycles (out_stall_cycles),
    .q_req_valid      (q_req_valid),
    .q_req_addr       (q_req_addr),
    .q_resp_valid     (q_resp_valid),
    .q_resp_char      (q_resp_char),
    .ref_valid        (ref_valid),
    .ref_ready        (ref_ready),
    .ref_char         (ref_char),
    .arr_en           (arr_en),
    .arr_clear        (arr_clear),
    .arr_q_shift      (arr_q_shift),
    .arr_q_active     (arr_q_active),
    .arr_q_char       (arr_q_char),
    .arr_q_col        (arr_q_col),
    .arr_in_valid     (arr_in_valid),
    .arr_in_link      (arr_in_link),
    .arr_out_valid    (arr_out_valid),
    .arr_out_link     (arr_out_link),
    .arr_st_capture   (arr_st_capture),
    .arr_st_shift     (arr_st_shift),
    .arr_state_out    (arr_state_out),
    .pf_part_start    (pf_part_start),
    .pf_wr_half       (pf_wr_half),
    .pf_wr_active     (pf_wr_active),
    .pf_rd_active     (pf_rd_active),
    .pf_flushed       (pf_flushed),
    .pf_wr_valid      (pf_wr_valid),
    .pf_wr_ready      (pf_wr_ready),
    .pf_wr_data       (pf_wr_data),
    .pf_rd_valid      (pf_rd_valid),
    .pf_rd_ready      (pf_rd_ready),
    .pf_rd_data       (pf_rd_data),
    .pss_wr_valid     (pss_wr_valid),
    .pss_wr_ready     (pss_wr_ready),
    .pss_wr_addr      (pss_wr_addr),
    .pss_wr_data      (pss_wr_data),
    .darm_start       (darm_start),
    .darm_n_records   (darm_n_records),
    .darm_done        (darm_done),
    .row_valid        (row_valid),
    .row_link         (row_link)
  );

  pe_array #(.N_PE(N_PE)) u_array (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (arr_en),
    .clear      (arr_clear),
    .q_shift    (arr_q_shift),
    .q_active   (arr_q_active),
    .q_char     (arr_q_char),
    .q_col      (arr_q_col),
    .in_valid   (arr_in_valid),
    .in_link    (arr_in_link),
    .out_valid  (arr_out_valid),
    .out_link   (arr_out_link),
    .st_capture (arr_st_capture),
    .st_shift   (arr_st_shift),
    .state_out  (arr_state_out)
  );

  partition_fifo #(
    .N_DRIVES  (N_DRIVES),
    .STRIPE    (STRIPE),
    .BUF_DEPTH   (BUF_DEPTH),
    .RING_DEPTH  (DBUF_RING_DEPTH),
    .CACHE_DEPTH (DBUF_CACHE_DEPTH)
  ) u_pfifo (
    .clk           (clk),
    .rst_n         (rst_n),
    .part_start    (pf_part_start),
    .wr_half       (pf_wr_half),
    .wr_active     (pf_wr_active),
    .rd_active     (pf_rd_active),
    .flushed       (pf_flushed),
    .wr_valid      (pf_wr_valid),
    .wr_ready      (pf_wr_ready),
    .wr_data       (pf_wr_data),
    .rd_valid      (pf_rd_valid),
    .rd_ready      (pf_rd_ready),
    .rd_data       (pf_rd_data),
    .drv_cmd_valid (drv_cmd_valid),
    .drv_cmd_write (drv_cmd_write),
    .drv_cmd_ready (drv_cmd_ready),
    .drv_wr_valid  (drv_wr_valid),
    .drv_wr_ready  (drv_wr_ready),
    .drv_wr_data   (drv_wr_data),
    .drv_rd_valid  (drv_rd_valid),
    .drv_rd_ready  (drv_rd_ready),
    .drv_rd_data   (drv_rd_data),
    .dbuf_wr_valid      (dbuf_wr_valid),
    .dbuf_wr_ready      (dbuf_wr_ready),
    .dbuf_wr_addr       (dbuf_wr_addr),
    .dbuf_wr_data       (dbuf_wr_data),
    .dbuf_rd_valid      (dbuf_rd_valid),
    .dbuf_rd_ready      (dbuf_rd_ready),
    .dbuf_rd_addr       (dbuf_rd_addr),
    .dbuf_rd_resp_valid (dbuf_rd_resp_valid),
    .dbuf_rd_resp_data  (dbuf_rd_resp_data)
  );

  pss #(.ONCHIP_DEPTH(PSS_ONCHIP_DEPTH)) u_pss (
    .clk                (clk),
    .rst_n              (rst_n),
    .wr_valid           (pss_wr_valid),
    .wr_ready           (pss_wr_ready),
    .wr_addr            (pss_wr_addr),
    .wr_data            (pss_wr_data),
    .rd_req_valid       (pss_rd_req_valid),
    .rd_req_ready       (pss_rd_req_ready),
    .rd_req_addr        (pss_rd_req_addr),
    .rd_resp_valid      (pss_rd_resp_valid),
    .rd_resp_data       (pss_rd_resp_data),
    .dram_wr_valid      (pss_dram_wr_valid),
    .dram_wr_ready      (pss_dram_wr_ready),
    .dram_wr_addr       (pss_dram_wr_addr),
    .dram_wr_data       (pss_dram_wr_data),
    .dram_rd_valid      (pss_dram_rd_valid),
    .dram_rd_ready      (pss_dram_rd_ready),
    .dram_rd_addr       (pss_dram_rd_addr),
    .dram_rd_resp_valid (pss_dram_rd_resp_valid),
    .dram_rd_resp_data  (pss_dram_rd_resp_data)
  );

  darm u_darm (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (darm_start),
    .n_records      (darm_n_records),
    .threshold      (threshold),
    .busy           (darm_busy),
    .rd_req_valid   (pss_rd_req_valid),
    .rd_req_ready   (pss_rd_req_ready),
    .rd_req_addr    (pss_rd_req_addr),
    .rd_resp_valid  (pss_rd_resp_valid),
    .rd_resp_data   (pss_rd_resp_data),
    .aln_valid      (aln_valid),
    .aln_query_pos  (aln_query_pos),
    .aln_ref_pos    (aln_ref_pos),
    .aln_score      (aln_score),
    .done           (darm_done),
    .hits           (hits),
    .best_score     (best_score),
    .best_query_pos (best_query_pos),
    .best_ref_pos   (best_ref_pos)
  );

endmodule
