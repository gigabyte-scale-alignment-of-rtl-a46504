// dialign_pe: one processing element of the systolic alignment array.
//
// The PE holds one character of the query sequence (one column of the
// scoring matrix). The reference sequence streams past it one character per
// cycle, so on each valid input the PE scores the cell (j, i) where j is the
// row carried by the input and i its own column, following Smith-Waterman
// local alignment with affine gaps:
//   E(j,i) = max(H(j,i-1) - GAP_OPEN, E(j,i-1) - GAP_EXTEND)   from the left PE
//   F(j,i) = max(H(j-1,i) - GAP_OPEN, F(j-1,i) - GAP_EXTEND)   kept locally
//   H(j,i) = max(0, H(j-1,i-1) + s(a_i,b_j), E(j,i), F(j,i))
// H(j-1,i-1) is the H that arrived from the left PE on the previous valid
// input, so each PE keeps only three scores of its own (linear memory).
// It also tracks the best H of its column and the row where it occurred,
// and passes on the row's running best score and its column.
//
// Interface and timing:
//   en       global advance; when low every register holds (array stall).
//   clear    start of a partition: column state back to the matrix border.
//   q_shift  query load chain: q_in moves into this PE, its old value to q_out.
//            A PE loaded with q_in.active = 0 is a bypass: it forwards its
//            input unchanged (used for the tail of the last partition).
//   in_*     link from the left neighbour; out_* is registered, one cycle
//            of latency per PE, one cell per cycle.
//   st_capture/st_shift  end-state chain towards the retrieval side.
// The daisy chain, the stored query character and the linear score memory
// follow the described architecture; the scoring recurrence, the score
// values and the choice of tracked quantities are this design's.
module dialign_pe
  import dialign_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  logic      clear,
  // query load chain
  input  logic      q_shift,
  input  logic      q_in_active,
  input  char_t     q_in_char,
  input  word_t     q_in_col,
  output logic      q_out_active,
  output char_t     q_out_char,
  output word_t     q_out_col,
  // scoring link
  input  logic      in_valid,
  input  link_t     in_link,
  output logic      out_valid,
  output link_t     out_link,
  // end-state chain
  input  logic      st_capture,
  input  logic      st_shift,
  input  pe_state_t st_in,
  output pe_state_t st_out
);

  logic   active;
  char_t  qchar;
  word_t  qcol;

  score_t h_up;     // H(j-1, i)
  score_t f_up;     // F(j-1, i)
  score_t h_diag;   // H(j-1, i-1)
  score_t best;
  word_t  best_row;

  score_t e_new, f_new, h_new, d_new;

  always_comb begin
    e_new = smax(in_link.h - GAP_OPEN, in_link.e - GAP_EXTEND);
    f_new = smax(h_up - GAP_OPEN, f_up - GAP_EXTEND);
    d_new = h_diag + subst(qchar, char_t'(in_link.ref_char));
    h_new = smax(smax(32'sd0, d_new), smax(e_new, f_new));
  end

  // query character register (load chain)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      qchar  <= '0;
      qcol   <= '0;
    end else if (q_shift) begin
      active <= q_in_active;
      qchar  <= q_in_char;
      qcol   <= q_in_col;
    end
  end

  assign q_out_active = active;
  assign q_out_char   = qchar;
  assign q_out_col    = qcol;

  // column state and output link
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_up      <= '0;
      f_up      <= NEG_INF;
      h_diag    <= '0;
      best      <= '0;
      best_row  <= '0;
      out_valid <= 1'b0;
      out_link  <= '0;
    end else if (clear) begin
      h_up      <= '0;
      f_up      <= NEG_INF;
      h_diag    <= '0;
      best      <= '0;
      best_row  <= '0;
      out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (!active) begin
          out_link <= in_link;
        end else begin
          h_diag <= in_link.h;
          h_up   <= h_new;
          f_up   <= f_new;
          if (h_new > best) begin
            best     <= h_new;
            best_row <= in_link.row;
          end
          out_link.ref_char <= in_link.ref_char;
          out_link.row      <= in_link.row;
          out_link.h        <= h_new;
          out_link.e        <= e_new;
          out_link.flags    <= in_link.flags;
          if (h_new > in_link.row_best) begin
            out_link.row_best     <= h_new;
            out_link.row_best_col <= qcol;
          end else begin
            out_link.row_best     <= in_link.row_best;
            out_link.row_best_col <= in_link.row_best_col;
          end
        end
      end
    end
  end

  // end-state chain
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_out <= '0;
    end else if (st_capture) begin
      st_out.best_score <= best;
      st_out.best_row   <= best_row;
      st_out.best_col   <= active ? qcol : '0;
      st_out.query_char <= word_t'(qchar);
    end else if (st_shift) begin
      st_out <= st_in;
    end
  end

endmodule
