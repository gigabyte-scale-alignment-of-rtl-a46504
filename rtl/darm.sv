// darm: alignment retrieval module.
//
// After all partitions are scored, the end states of all PEs sit in the
// Partition-State-Storage, one record per query column. The retrieval
// module reads them back in order and composes the alignment output: a
// stream of mappings from a query coordinate to the reference coordinate
// where that column scored best, for every column whose best score reaches
// a user threshold (the threshold acts as the dial between few strong local
// matches and many weaker ones), plus the overall best mapping.
//
// Interface and timing:
//   start/n_records/threshold  start reads addresses 0 .. n_records-1.
//   rd_req_*/rd_resp_*         read port of the storage; requests are issued
//                              back to back whenever rd_req_ready is high.
//   aln_*                      one mapping per cycle at most, no backpressure.
//                              Records with best_col = 0 (unused PEs) are
//                              skipped.
//   done                       one-cycle pulse after the last response;
//                              hits, best_* are then final.
// What is retrieved and that it comes out as query-to-reference mappings
// follows the description; the record format, the threshold test and the
// best tracking are this design's.
module darm
  import dialign_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  word_t     n_records,
  input  score_t    threshold,
  output logic      busy,
  output logic      rd_req_valid,
  input  logic      rd_req_ready,
  output word_t     rd_req_addr,
  input  logic      rd_resp_valid,
  input  pe_state_t rd_resp_data,
  output logic      aln_valid,
  output word_t     aln_query_pos,
  output word_t     aln_ref_pos,
  output score_t    aln_score,
  output logic      done,
  output word_t     hits,
  output score_t    best_score,
  output word_t     best_query_pos,
  output word_t     best_ref_pos
);

  word_t req_cnt, resp_cnt;
  logic  rec_used;

  assign rd_req_valid = busy && (req_cnt != n_records);
  assign rd_req_addr  = req_cnt;
  assign rec_used     = rd_resp_valid && (rd_resp_data.best_col != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy           <= 1'b0;
      req_cnt        <= '0;
      resp_cnt       <= '0;
      aln_valid      <= 1'b0;
      aln_query_pos  <= '0;
      aln_ref_pos    <= '0;
      aln_score      <= '0;
      done           <= 1'b0;
      hits           <= '0;
      best_score     <= '0;
      best_query_pos <= '0;
      best_ref_pos   <= '0;
    end else begin
      done      <= 1'b0;
      aln_valid <= 1'b0;
      if (start && !busy) begin
        busy           <= 1'b1;
        req_cnt        <= '0;
        resp_cnt       <= '0;
        hits           <= '0;
        best_score     <= '0;
        best_query_pos <= '0;
        best_ref_pos   <= '0;
        if (n_records == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (busy) begin
        if (rd_req_valid && rd_req_ready) req_cnt <= req_cnt + 1'b1;
        if (rd_resp_valid) begin
          resp_cnt <= resp_cnt + 1'b1;
          if (resp_cnt + 1'b1 == n_records) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
        if (rec_used && rd_resp_data.best_score >= threshold) begin
          aln_valid     <= 1'b1;
          aln_query_pos <= rd_resp_data.best_col;
          aln_ref_pos   <= rd_resp_data.best_row;
          aln_score     <= rd_resp_data.best_score;
          hits          <= hits + 1'b1;
        end
        if (rec_used && rd_resp_data.best_score > best_score) begin
          best_score     <= rd_resp_data.best_score;
          best_query_pos <= rd_resp_data.best_col;
          best_ref_pos   <= rd_resp_data.best_row;
        end
      end
    end
  end

endmodule
