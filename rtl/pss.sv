// pss: Partition-State-Storage.
//
// When the query is longer than the array, the PEs are reused for one
// partition of the query after another, and at the end of each partition
// the end state of every PE (16 bytes: best score, its row, the column and
// the query character) must be kept until retrieval. Record k of partition
// p is stored at address p*N_PE + k. The first ONCHIP_DEPTH records live in
// an on-chip memory; records beyond it go to off-chip DRAM through the
// dram_* port, so the number of partitions is not limited by on-chip memory.
//
// Interface and timing:
//   wr_*        write port, valid/ready. On-chip writes are always ready;
//               spilled writes wait for dram_wr_ready.
//   rd_req_*    read request, valid/ready, one address per request.
//   rd_resp_*   read response, in request order, no backpressure. On-chip
//               reads answer on the next cycle and may be issued every
//               cycle; a DRAM read blocks further requests until its data
//               returns, so retrieval slows down in the spilled region.
//   dram_*      off-chip DRAM request/response port (a DRAM controller is
//               outside this design).
// The split between on-chip memory and DRAM follows the description; the
// on-chip capacity and the port protocol are this design's choices.
module pss
  import dialign_pkg::*;
#(
  parameter int unsigned ONCHIP_DEPTH = 1600
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wr_valid,
  output logic      wr_ready,
  input  word_t     wr_addr,
  input  pe_state_t wr_data,
  input  logic      rd_req_valid,
  output logic      rd_req_ready,
  input  word_t     rd_req_addr,
  output logic      rd_resp_valid,
  output pe_state_t rd_resp_data,
  output logic      dram_wr_valid,
  input  logic      dram_wr_ready,
  output word_t     dram_wr_addr,
  output pe_state_t dram_wr_data,
  output logic      dram_rd_valid,
  input  logic      dram_rd_ready,
  output word_t     dram_rd_addr,
  input  logic      dram_rd_resp_valid,
  input  pe_state_t dram_rd_resp_data
);

  localparam int unsigned AW = $clog2(ONCHIP_DEPTH);

  pe_state_t mem [ONCHIP_DEPTH];
  logic      wr_onchip, rd_onchip;
  logic      dram_pending;
  logic      onchip_resp;
  pe_state_t onchip_data;

  assign wr_onchip = (wr_addr < word_t'(ONCHIP_DEPTH));
  assign rd_onchip = (rd_req_addr < word_t'(ONCHIP_DEPTH));

  // write side
  assign wr_ready      = wr_onchip ? 1'b1 : dram_wr_ready;
  assign dram_wr_valid = wr_valid && !wr_onchip;
  assign dram_wr_addr  = wr_addr - word_t'(ONCHIP_DEPTH);
  assign dram_wr_data  = wr_data;

  always_ff @(posedge clk) begin
    if (wr_valid && wr_onchip) mem[wr_addr[AW-1:0]] <= wr_data;
    if (rd_req_valid && rd_req_ready && rd_onchip) onchip_data <= mem[rd_req_addr[AW-1:0]];
  end

  // read side
  assign rd_req_ready  = !dram_pending && (rd_onchip || dram_rd_ready);
  assign dram_rd_valid = rd_req_valid && !rd_onchip && !dram_pending;
  assign dram_rd_addr  = rd_req_addr - word_t'(ONCHIP_DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dram_pending <= 1'b0;
      onchip_resp  <= 1'b0;
    end else begin
      onchip_resp <= rd_req_valid && rd_req_ready && rd_onchip;
      if (dram_rd_valid && dram_rd_ready) dram_pending <= 1'b1;
      else if (dram_rd_resp_valid)        dram_pending <= 1'b0;
    end
  end

  assign rd_resp_valid = onchip_resp || (dram_pending && dram_rd_resp_valid);
  assign rd_resp_data  = onchip_resp ? onchip_data : dram_rd_resp_data;

endmodule
