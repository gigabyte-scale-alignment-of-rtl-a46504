// tb_dialign_pe: self-checking test of one processing element.
//
// The PE is loaded as column 2 of a two-column matrix. Its left input on
// every row is column 1 of the software model (H, E, row best), so its
// outputs must equal column 2 of the model. Inputs arrive with random
// bubbles and random stall cycles (en low, all state held). Afterwards the
// end state is captured and checked, a stall is checked to hold the
// output, and a PE loaded as unused is checked to pass its input through.
module tb_dialign_pe;
  import dialign_pkg::*;
  import sw_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      en, clear, q_shift, q_in_active, q_out_active;
  char_t     q_in_char, q_out_char;
  word_t     q_in_col, q_out_col;
  logic      in_valid, out_valid;
  link_t     in_link, out_link;
  logic      st_capture, st_shift;
  pe_state_t st_in, st_out;

  int checks = 0;
  int failures = 0;

  dialign_pe dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned qs[], rs[];
    sw_model m;
    int R;
    int j_next, j_pending;
    link_t held;
    R = 60;

    en = 0; clear = 0; q_shift = 0; q_in_active = 0; q_in_char = 0; q_in_col = 0;
    in_valid = 0; in_link = '0; st_capture = 0; st_shift = 0; st_in = '0;
    make_seqs(2, R, 3, qs, rs);
    qs[0] = rs[5]; qs[1] = rs[6];
    m = new(qs, rs);
    m.run();

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // load column 2
    q_shift = 1; q_in_active = 1; q_in_char = char_t'(qs[1]); q_in_col = 2;
    clear = 1;
    @(negedge clk);
    q_shift = 0; clear = 0;
    check(q_out_active && q_out_char == char_t'(qs[1]) && q_out_col == 2, "query chain load");

    j_next = 1;
    j_pending = 0;
    while (j_next <= R || j_pending != 0) begin
      // check the result of the previous cycle
      if (j_pending != 0) begin
        int bj, bc;
        bj = m.row_best[j_pending];
        bc = m.row_col[j_pending];
        check(out_valid, "out_valid after input");
        check(int'(out_link.h) == m.h[j_pending][2], $sformatf("H row %0d: %0d vs %0d", j_pending, int'(out_link.h), m.h[j_pending][2]));
        check(int'(out_link.e) == m.e[j_pending][2], $sformatf("E row %0d", j_pending));
        check(out_link.row == word_t'(j_pending) && out_link.ref_char == word_t'(rs[j_pending-1]), "row/char forwarded");
        check(int'(out_link.row_best) == bj && out_link.row_best_col == word_t'(bc), $sformatf("row best row %0d", j_pending));
        j_pending = 0;
      end
      en = ($urandom_range(4) != 0);
      in_valid = (j_next <= R) && ($urandom_range(3) != 0);
      if (in_valid) begin
        in_link = '0;
        in_link.ref_char = word_t'(rs[j_next-1]);
        in_link.row = word_t'(j_next);
        in_link.h = score_t'(m.h[j_next][1]);
        in_link.e = score_t'(m.e[j_next][1]);
        in_link.row_best = (m.h[j_next][1] > 0) ? score_t'(m.h[j_next][1]) : '0;
        in_link.row_best_col = (m.h[j_next][1] > 0) ? 1 : 0;
      end
      @(negedge clk);
      if (en && in_valid) begin
        j_pending = j_next;
        j_next++;
      end else if (en) begin
        check(!out_valid, "bubble gives no output");
      end
    end
    en = 0; in_valid = 0;

    // stall holds the output
    held = out_link;
    in_valid = 1; in_link.h = 32'sd77;
    repeat (3) @(negedge clk);
    check(out_link == held, "stall holds output");
    in_valid = 0;

    // end state
    st_capture = 1;
    @(negedge clk);
    st_capture = 0;
    check(int'(st_out.best_score) == m.col_best[2] && st_out.best_row == word_t'(m.col_row[2]),
          $sformatf("end state best %0d@%0d vs %0d@%0d", int'(st_out.best_score), st_out.best_row, m.col_best[2], m.col_row[2]));
    check(st_out.best_col == 2 && st_out.query_char == word_t'(qs[1]), "end state column and char");
    st_in = '{best_score: 5, best_row: 6, best_col: 7, query_char: 8};
    st_shift = 1;
    @(negedge clk);
    st_shift = 0;
    check(st_out == st_in, "state chain shift");

    // unused PE: bypass
    q_shift = 1; q_in_active = 0; clear = 1;
    @(negedge clk);
    q_shift = 0; clear = 0;
    for (int k = 0; k < 5; k++) begin
      en = 1; in_valid = 1;
      in_link = link_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      @(negedge clk);
      check(out_valid && out_link == in_link, "bypass forwards input");
    end
    st_capture = 1; en = 0; in_valid = 0;
    @(negedge clk);
    st_capture = 0;
    check(st_out.best_col == 0, "unused PE reports column 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
