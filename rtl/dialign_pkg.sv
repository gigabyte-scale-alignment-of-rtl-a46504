// dialign_pkg: types and constants shared by the partitioned systolic
// alignment accelerator.
//
// All coordinates and scores are 32-bit words, because gigabyte-scale
// reference sequences and megabyte-scale query sequences need 32-bit row
// and column coordinates. Characters are 8-bit so that both DNA and
// protein alphabets fit.
//
// link_t is the seven-word bundle that moves from one PE to the next on
// every cycle of matrix scoring (7 x 32 bits = 28 bytes). The same bundle is
// what the last PE of a partition writes into the partition FIFO and what
// the first PE of the next partition reads back.
//
// pe_state_t is the four-word end state of one PE (4 x 32 bits = 16 bytes)
// that the Partition-State-Storage keeps and the retrieval module reads.
//
// The seven words are named by the design: the character and row of the
// reference sequence, the cell score H and horizontal gap score E of the
// sender's column, the best score seen so far along the current row and its
// column, and a flags word. Scoring is Smith-Waterman local alignment with
// affine gap penalties; the penalty values below are this design's defaults.
package dialign_pkg;

  localparam int unsigned WORD_W = 32;
  localparam int unsigned CHAR_W = 8;

  typedef logic [WORD_W-1:0]        word_t;
  typedef logic signed [WORD_W-1:0] score_t;
  typedef logic [CHAR_W-1:0]        char_t;

  // Substitution and gap scores (linear in gap length after the opening).
  localparam score_t MATCH_SCORE    = 32'sd2;
  localparam score_t MISMATCH_SCORE = -32'sd1;
  localparam score_t GAP_OPEN       = 32'sd3;  // cost of the first gap position
  localparam score_t GAP_EXTEND     = 32'sd1;  // cost of every further position
  // Stand-in for minus infinity; far from the 32-bit limit so that
  // subtracting penalties from it never wraps.
  localparam score_t NEG_INF        = -32'sd1048576;

  // Bit 0 of the flags word marks the last row of the reference sequence.
  localparam int unsigned FLAG_LAST = 0;

  typedef struct packed {
    word_t  ref_char;     // reference character, zero-extended
    word_t  row;          // reference coordinate j, 1-based
    score_t h;            // H(j, i) of the sending column
    score_t e;            // E(j, i): best score of a gap in the query ending here
    score_t row_best;     // best H on row j over the columns passed so far
    word_t  row_best_col; // query coordinate of row_best (0: none yet)
    word_t  flags;        // FLAG_LAST and reserved bits
  } link_t;

  localparam int unsigned LINK_W = $bits(link_t);

  typedef struct packed {
    score_t best_score;   // best H in this PE's column
    word_t  best_row;     // reference coordinate of best_score
    word_t  best_col;     // query coordinate of this column (0: PE unused)
    word_t  query_char;   // query character held by the PE, zero-extended
  } pe_state_t;

  localparam int unsigned STATE_W = $bits(pe_state_t);

  // Substitution score of a query/reference character pair.
  function automatic score_t subst(input char_t a, input char_t b);
    return (a == b) ? MATCH_SCORE : MISMATCH_SCORE;
  endfunction

  function automatic score_t smax(input score_t a, input score_t b);
    return (a > b) ? a : b;
  endfunction

endpackage
