// pe_array: the linear systolic array of N_PE processing elements.
//
// The PEs are daisy-chained: PE k takes its scoring link from PE k-1, and
// PE 0 takes it from the array input. A reference row entering PE 0 on
// cycle t leaves PE N_PE-1 on cycle t+N_PE, so the array computes one
// anti-diagonal of the scoring matrix per cycle, N_PE cells at a time.
//
// Two further chains run through the PEs:
//   query load chain  enters at PE 0 and moves towards PE N_PE-1; after
//                     N_PE shifts the first value fed sits in PE N_PE-1, so
//                     the loader feeds the partition's columns last first.
//   end-state chain   after st_capture every PE holds its end state; each
//                     st_shift moves them one PE towards the output end, so
//                     state_out shows PE N_PE-1 first and PE 0 after N_PE-1
//                     shifts (the n-cycle retrieval latency of the chain).
// en stalls all PEs together. N_PE defaults to 100, the number of PEs the
// description reports fitting on a current FPGA.
module pe_array
  import dialign_pkg::*;
#(
  parameter int unsigned N_PE = 100
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  logic      clear,
  input  logic      q_shift,
  input  logic      q_active,
  input  char_t     q_char,
  input  word_t     q_col,
  input  logic      in_valid,
  input  link_t     in_link,
  output logic      out_valid,
  output link_t     out_link,
  input  logic      st_capture,
  input  logic      st_shift,
  output pe_state_t state_out
);

  logic      q_act_c  [N_PE+1];
  char_t     q_char_c [N_PE+1];
  word_t     q_col_c  [N_PE+1];
  logic      valid_c  [N_PE+1];
  link_t     link_c   [N_PE+1];
  pe_state_t st_c     [N_PE+1];

  assign q_act_c[0]  = q_active;
  assign q_char_c[0] = q_char;
  assign q_col_c[0]  = q_col;
  assign valid_c[0]  = in_valid;
  assign link_c[0]   = in_link;
  assign st_c[0]     = '0;

  for (genvar k = 0; k < N_PE; k++) begin : g_pe
    dialign_pe u_pe (
      .clk          (clk),
      .rst_n        (rst_n),
      .en           (en),
      .clear        (clear),
      .q_shift      (q_shift),
      .q_in_active  (q_act_c[k]),
      .q_in_char    (q_char_c[k]),
      .q_in_col     (q_col_c[k]),
      .q_out_active (q_act_c[k+1]),
      .q_out_char   (q_char_c[k+1]),
      .q_out_col    (q_col_c[k+1]),
      .in_valid     (valid_c[k]),
      .in_link      (link_c[k]),
      .out_valid    (valid_c[k+1]),
      .out_link     (link_c[k+1]),
      .st_capture   (st_capture),
      .st_shift     (st_shift),
      .st_in        (st_c[k]),
      .st_out       (st_c[k+1])
    );
  end

  assign out_valid = valid_c[N_PE];
  assign out_link  = link_c[N_PE];
  assign state_out = st_c[N_PE];

endmodule
