// tb_pe_array: self-checking test of the systolic PE array.
//
// An 8-PE array is loaded with a query (first of 8 columns, then of 5
// columns so that three PEs run as bypass) and fed the reference with the
// matrix border on the left. Every row leaving the last PE must carry the
// model's H and E of the last query column and the row's best score. The
// first row must leave exactly N_PE cycles after it entered. The end
// states are then shifted out and compared column by column (last PE
// first). Random stalls of the whole array are applied during the second run.
module tb_pe_array;
  import dialign_pkg::*;
  import sw_ref_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      en, clear, q_shift, q_active;
  char_t     q_char;
  word_t     q_col;
  logic      in_valid, out_valid;
  link_t     in_link, out_link;
  logic      st_capture, st_shift;
  pe_state_t state_out;

  int checks = 0;
  int failures = 0;

  pe_array #(.N_PE(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int qn, input int rn, input bit stalls);
    byte unsigned qs[], rs[];
    sw_model m;
    int j_in, j_out, cyc, first_in_cyc, first_out_cyc;
    make_seqs(qn, rn, 4, qs, rs);
    m = new(qs, rs);
    m.run();
    // load: last column first; columns beyond the query are bypass PEs
    clear = 1;
    for (int k = 0; k < N; k++) begin
      int col;
      col = N - k;
      q_shift  = 1;
      q_active = (col <= qn);
      q_char   = (col <= qn) ? char_t'(qs[col-1]) : '0;
      q_col    = word_t'(col);
      @(negedge clk);
      clear = 0;
    end
    q_shift = 0;
    j_in = 1; j_out = 1; cyc = 0; first_in_cyc = -1; first_out_cyc = -1;
    while (j_out <= rn && cyc < 10000) begin
      en = stalls ? ($urandom_range(3) != 0) : 1'b1;
      in_valid = (j_in <= rn);
      in_link = '0;
      if (in_valid) begin
        in_link.ref_char = word_t'(rs[j_in-1]);
        in_link.row = word_t'(j_in);
        in_link.e = NEG_INF;
      end
      if (en && out_valid) begin
        if (first_out_cyc < 0) first_out_cyc = cyc;
        check(out_link.row == word_t'(j_out), $sformatf("row order %0d vs %0d", out_link.row, j_out));
        check(int'(out_link.h) == m.h[j_out][qn], $sformatf("H row %0d: %0d vs %0d", j_out, int'(out_link.h), m.h[j_out][qn]));
        check(int'(out_link.e) == m.e[j_out][qn], $sformatf("E row %0d", j_out));
        check(int'(out_link.row_best) == m.row_best[j_out] && out_link.row_best_col == word_t'(m.row_col[j_out]),
              $sformatf("row best row %0d: %0d@%0d vs %0d@%0d", j_out, int'(out_link.row_best), out_link.row_best_col, m.row_best[j_out], m.row_col[j_out]));
        j_out++;
      end
      if (en && in_valid) begin
        if (first_in_cyc < 0) first_in_cyc = cyc;
        j_in++;
      end
      @(negedge clk);
      cyc++;
    end
    en = 0; in_valid = 0;
    check(j_out == rn + 1, "all rows out");
    if (!stalls) check(first_out_cyc - first_in_cyc == N, $sformatf("latency %0d cycles, expected %0d", first_out_cyc - first_in_cyc, N));
    // end states
    st_capture = 1;
    @(negedge clk);
    st_capture = 0;
    for (int k = 0; k < N; k++) begin
      int col;
      col = N - k;
      if (col <= qn) begin
        check(state_out.best_col == word_t'(col) && int'(state_out.best_score) == m.col_best[col] &&
              state_out.best_row == word_t'(m.col_row[col]) && state_out.query_char == word_t'(qs[col-1]),
              $sformatf("state col %0d: %0d@%0d vs %0d@%0d", col, int'(state_out.best_score), state_out.best_row, m.col_best[col], m.col_row[col]));
      end else begin
        check(state_out.best_col == 0, "unused PE state");
      end
      st_shift = 1;
      @(negedge clk);
      st_shift = 0;
    end
  endtask

  initial begin
    en = 0; clear = 0; q_shift = 0; q_active = 0; q_char = 0; q_col = 0;
    in_valid = 0; in_link = '0; st_capture = 0; st_shift = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_case(N, 40, 1'b0);
    run_case(5, 50, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
