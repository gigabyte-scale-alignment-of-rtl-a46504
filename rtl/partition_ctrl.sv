// partition_ctrl: sequencer of the partitioned alignment.
//
// A query of qlen characters is processed by an array of N_PE PEs in
// partitions of N_PE columns. For each partition p the controller
//   1. LOAD  clears the PEs and shifts in the partition's query characters
//            (columns p*N_PE+1 .. p*N_PE+N_PE, last column first); columns
//            beyond the query become bypass PEs;
//   2. OPEN  waits until the partition FIFO has flushed the previous
//            partition's writes, then opens the FIFO: the write half is
//            p mod 2, reads come from the other half;
//   3. RUN   streams rlen rows into PE 0 (partition 0: from the reference
//            stream with the matrix border as scores; later partitions:
//            from the partition FIFO) and sends the last PE's output to the
//            FIFO, or, in the last partition, to the row result port;
//   4. SAVE  captures the PE end states and shifts them into the
//            Partition-State-Storage at p*N_PE + k for PE k.
// After the last partition it starts the retrieval module over all
// records and pulses done when retrieval ends.
//
// Stalls: the whole array holds (arr_en low) whenever its output word
// cannot be handed on, i.e. the FIFO write side is not ready. When the
// input side has no word (reference stream or FIFO read side empty), a
// bubble enters instead and the array keeps running. in_stall_cycles and
// out_stall_cycles count both cases during RUN; run_cycles counts all RUN
// cycles, so the loss of throughput caused by storage bandwidth can be read
// directly. The partitioning scheme follows the description; the state
// order, the bubble policy and the counters are this design's.
module partition_ctrl
  import dialign_pkg::*;
#(
  parameter int unsigned N_PE = 100
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  word_t     qlen,
  input  word_t     rlen,
  output logic      busy,
  output logic      done,
  output word_t     partitions,
  output word_t     run_cycles,
  output word_t     in_stall_cycles,
  output word_t     out_stall_cycles,
  // query memory (in-order responses, any latency)
  output logic      q_req_valid,
  output word_t     q_req_addr,
  input  logic      q_resp_valid,
  input  char_t     q_resp_char,
  // reference stream
  input  logic      ref_valid,
  output logic      ref_ready,
  input  char_t     ref_char,
  // PE array
  output logic      arr_en,
  output logic      arr_clear,
  output logic      arr_q_shift,
  output logic      arr_q_active,
  output char_t     arr_q_char,
  output word_t     arr_q_col,
  output logic      arr_in_valid,
  output link_t     arr_in_link,
  input  logic      arr_out_valid,
  input  link_t     arr_out_link,
  output logic      arr_st_capture,
  output logic      arr_st_shift,
  input  pe_state_t arr_state_out,
  // partition FIFO
  output logic      pf_part_start,
  output logic      pf_wr_half,
  output logic      pf_wr_active,
  output logic      pf_rd_active,
  input  logic      pf_flushed,
  output logic      pf_wr_valid,
  input  logic      pf_wr_ready,
  output link_t     pf_wr_data,
  input  logic      pf_rd_valid,
  output logic      pf_rd_ready,
  input  link_t     pf_rd_data,
  // partition state storage, write side
  output logic      pss_wr_valid,
  input  logic      pss_wr_ready,
  output word_t     pss_wr_addr,
  output pe_state_t pss_wr_data,
  // retrieval
  output logic      darm_start,
  output word_t     darm_n_records,
  input  logic      darm_done,
  // rows leaving the last partition
  output logic      row_valid,
  output link_t     row_link
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_OPEN, S_RUN, S_CAPTURE, S_SAVE, S_RETRIEVE
  } state_e;

  state_e state;
  word_t  part;      // current partition index
  word_t  base;      // query offset of the partition (0-based)
  word_t  pss_base;  // part * N_PE
  word_t  k_issue, k_shift, k_save;
  word_t  in_cnt, out_cnt;
  logic   last_part;
  logic   first_part;
  word_t  load_addr;
  logic   load_inactive;
  logic   src_valid;
  logic   take_in;
  logic   out_ok;

  assign last_part  = (base + word_t'(N_PE) >= qlen);
  assign first_part = (part == '0);
  assign busy       = (state != S_IDLE);

  // ---- LOAD: query characters, last column first ----
  assign load_addr     = base + word_t'(N_PE) - 1'b1 - k_issue;
  assign load_inactive = (load_addr >= qlen);
  assign q_req_valid   = (state == S_LOAD) && (k_issue != word_t'(N_PE)) && !load_inactive;
  assign q_req_addr    = load_addr;

  always_comb begin
    arr_q_shift  = 1'b0;
    arr_q_active = 1'b0;
    arr_q_char   = '0;
    arr_q_col    = '0;
    if (state == S_LOAD) begin
      if (k_issue != word_t'(N_PE) && load_inactive) begin
        arr_q_shift = 1'b1;            // columns past the query: bypass PEs
      end else if (q_resp_valid) begin
        arr_q_shift  = 1'b1;
        arr_q_active = 1'b1;
        arr_q_char   = q_resp_char;
        arr_q_col    = base + word_t'(N_PE) - k_shift; // 1-based column
      end
    end
  end

  // ---- RUN: data path around the array ----
  assign src_valid = first_part ? ref_valid : pf_rd_valid;
  assign out_ok    = !arr_out_valid || last_part || pf_wr_ready;
  assign arr_en    = (state == S_RUN) && out_ok;
  assign take_in   = arr_en && (in_cnt != rlen) && src_valid;

  assign ref_ready    = take_in && first_part;
  assign pf_rd_ready  = take_in && !first_part;
  assign arr_in_valid = take_in;

  always_comb begin
    if (first_part) begin
      arr_in_link              = '0;
      arr_in_link.ref_char     = word_t'(ref_char);
      arr_in_link.row          = in_cnt + 1'b1;
      arr_in_link.h            = '0;
      arr_in_link.e            = NEG_INF;
      arr_in_link.row_best     = '0;
      arr_in_link.row_best_col = '0;
      arr_in_link.flags        = word_t'(in_cnt + 1'b1 == rlen) << FLAG_LAST;
    end else begin
      arr_in_link = pf_rd_data;
    end
  end

  assign pf_wr_valid = (state == S_RUN) && arr_out_valid && !last_part;
  assign pf_wr_data  = arr_out_link;
  assign row_valid   = (state == S_RUN) && arr_out_valid && last_part;
  assign row_link    = arr_out_link;

  // ---- OPEN ----
  assign pf_part_start = (state == S_OPEN) && pf_flushed;
  assign pf_wr_half    = part[0];
  assign pf_wr_active  = !last_part;
  assign pf_rd_active  = !first_part;

  // ---- CAPTURE / SAVE ----
  assign arr_clear      = (state == S_LOAD) && (k_issue == '0) && (k_shift == '0);
  assign arr_st_capture = (state == S_CAPTURE);
  assign pss_wr_valid   = (state == S_SAVE);
  assign pss_wr_addr    = pss_base + word_t'(N_PE) - 1'b1 - k_save;
  assign pss_wr_data    = arr_state_out;
  assign arr_st_shift   = (state == S_SAVE) && pss_wr_ready;

  assign darm_n_records = pss_base + word_t'(N_PE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      part             <= '0;
      base             <= '0;
      pss_base         <= '0;
      k_issue          <= '0;
      k_shift          <= '0;
      k_save           <= '0;
      in_cnt           <= '0;
      out_cnt          <= '0;
      done             <= 1'b0;
      darm_start       <= 1'b0;
      partitions       <= '0;
      run_cycles       <= '0;
      in_stall_cycles  <= '0;
      out_stall_cycles <= '0;
    end else begin
      done       <= 1'b0;
      darm_start <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start && qlen != '0 && rlen != '0) begin
            state            <= S_LOAD;
            part             <= '0;
            base             <= '0;
            pss_base         <= '0;
            k_issue          <= '0;
            k_shift          <= '0;
            partitions       <= '0;
            run_cycles       <= '0;
            in_stall_cycles  <= '0;
            out_stall_cycles <= '0;
          end
        end
        S_LOAD: begin
          if (k_issue != word_t'(N_PE) && (load_inactive || q_req_valid)) k_issue <= k_issue + 1'b1;
          if (arr_q_shift) begin
            k_shift <= k_shift + 1'b1;
            if (k_shift == word_t'(N_PE - 1)) state <= S_OPEN;
          end
        end
        S_OPEN: begin
          if (pf_flushed) begin
            state   <= S_RUN;
            in_cnt  <= '0;
            out_cnt <= '0;
          end
        end
        S_RUN: begin
          run_cycles <= run_cycles + 1'b1;
          if (!arr_en) out_stall_cycles <= out_stall_cycles + 1'b1;
          else if (in_cnt != rlen && !src_valid) in_stall_cycles <= in_stall_cycles + 1'b1;
          if (take_in) in_cnt <= in_cnt + 1'b1;
          if (arr_en && arr_out_valid) begin
            out_cnt <= out_cnt + 1'b1;
            if (out_cnt + 1'b1 == rlen) state <= S_CAPTURE;
          end
        end
        S_CAPTURE: begin
          state  <= S_SAVE;
          k_save <= '0;
        end
        S_SAVE: begin
          if (pss_wr_ready) begin
            k_save <= k_save + 1'b1;
            if (k_save == word_t'(N_PE - 1)) begin
              partitions <= part + 1'b1;
              if (last_part) begin
                state      <= S_RETRIEVE;
                darm_start <= 1'b1;
              end else begin
                state    <= S_LOAD;
                part     <= part + 1'b1;
                base     <= base + word_t'(N_PE);
                pss_base <= pss_base + word_t'(N_PE);
                k_issue  <= '0;
                k_shift  <= '0;
              end
            end
          end
        end
        S_RETRIEVE: begin
          if (darm_done) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
