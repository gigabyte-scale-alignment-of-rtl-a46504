// tb_partition_ctrl: self-checking test of the partition sequencer.
//
// The controller drives a real 4-PE array. The partition FIFO, the state
// storage, the query memory (2-cycle latency) and the retrieval module are
// simple models here. A 10-character query (three partitions, the last
// with two bypass PEs) is aligned against a 25-character reference given
// with random gaps; the FIFO model refuses writes at random so the array
// stalls. Checks: every row of the last partition equals the software
// model's H, E and row best for the last query column; every stored end
// state equals the model's column best at address p*4 + k; the FIFO opens
// with the right half and direction per partition; query reads are in
// range; retrieval is started over 12 records; stalls and bubbles occur
// and are counted.
module tb_partition_ctrl;
  import dialign_pkg::*;
  import sw_ref_pkg::*;

  localparam int N = 4;
  localparam int QN = 10;
  localparam int RN = 25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      start, busy, done;
  word_t     qlen, rlen, partitions, run_cycles, in_stall_cycles, out_stall_cycles;
  logic      q_req_valid, q_resp_valid;
  word_t     q_req_addr;
  char_t     q_resp_char;
  logic      ref_valid, ref_ready;
  char_t     ref_char;
  logic      arr_en, arr_clear, arr_q_shift, arr_q_active;
  char_t     arr_q_char;
  word_t     arr_q_col;
  logic      arr_in_valid, arr_out_valid;
  link_t     arr_in_link, arr_out_link;
  logic      arr_st_capture, arr_st_shift;
  pe_state_t arr_state_out;
  logic      pf_part_start, pf_wr_half, pf_wr_active, pf_rd_active, pf_flushed;
  logic      pf_wr_valid, pf_wr_ready, pf_rd_valid, pf_rd_ready;
  link_t     pf_wr_data, pf_rd_data;
  logic      pss_wr_valid, pss_wr_ready;
  word_t     pss_wr_addr;
  pe_state_t pss_wr_data;
  logic      darm_start, darm_done;
  word_t     darm_n_records;
  logic      row_valid;
  link_t     row_link;

  int checks = 0;
  int failures = 0;

  partition_ctrl #(.N_PE(N)) dut (.*);

  pe_array #(.N_PE(N)) u_array (
    .clk(clk), .rst_n(rst_n), .en(arr_en), .clear(arr_clear),
    .q_shift(arr_q_shift), .q_active(arr_q_active), .q_char(arr_q_char), .q_col(arr_q_col),
    .in_valid(arr_in_valid), .in_link(arr_in_link), .out_valid(arr_out_valid), .out_link(arr_out_link),
    .st_capture(arr_st_capture), .st_shift(arr_st_shift), .state_out(arr_state_out)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned qs[], rs[];
  byte unsigned q_mem [QN];
  byte unsigned r_mem [RN+1];
  sw_model m;

  // query memory, 2 cycles of latency
  logic  q_v1;
  word_t q_a1;
  always_ff @(posedge clk) begin
    q_v1 <= q_req_valid;
    q_a1 <= q_req_addr;
    q_resp_valid <= q_v1;
    q_resp_char  <= (int'(q_a1) < QN) ? char_t'(q_mem[int'(q_a1)]) : '0;
    if (q_req_valid) check(int'(q_req_addr) < QN, "query read in range");
  end

  // reference source with gaps
  int ref_pos = 0;
  always_ff @(posedge clk) begin
    if (ref_valid && ref_ready) ref_pos <= ref_pos + 1;
  end
  assign ref_char = char_t'(r_mem[ref_pos]);
  always_ff @(posedge clk) ref_valid <= ($urandom_range(3) != 0) && (ref_pos + 1 < RN || (ref_pos < RN && !(ref_valid && ref_ready)));

  // partition FIFO model: a queue, random write readiness
  link_t fifo_q[$];
  link_t prev_q[$];
  int    opens = 0;
  always_ff @(posedge clk) pf_wr_ready <= ($urandom_range(2) != 0);
  assign pf_rd_valid = (prev_q.size() != 0);
  assign pf_rd_data  = (prev_q.size() != 0) ? prev_q[0] : '0;
  assign pf_flushed  = 1'b1;
  always @(posedge clk) begin
    if (rst_n && pf_part_start) begin
      check(pf_wr_half == opens[0], "write half alternates");
      check(pf_rd_active == (opens != 0) && pf_wr_active == (opens != 2), "FIFO directions");
      prev_q = fifo_q;
      fifo_q.delete();
      opens++;
    end else begin
      if (pf_wr_valid && pf_wr_ready) fifo_q.push_back(pf_wr_data);
      if (pf_rd_valid && pf_rd_ready) void'(prev_q.pop_front());
    end
  end

  // state storage model
  pe_state_t pss_mem [int];
  assign pss_wr_ready = 1'b1;
  always @(posedge clk) if (pss_wr_valid) pss_mem[int'(pss_wr_addr)] = pss_wr_data;

  // retrieval model
  always_ff @(posedge clk) darm_done <= darm_start;

  int rows_seen = 0;
  always @(posedge clk) begin
    if (rst_n && row_valid && arr_en) begin
      int j;
      j = rows_seen + 1;
      check(int'(row_link.row) == j, "row order");
      check(int'(row_link.h) == m.h[j][QN] && int'(row_link.e) == m.e[j][QN], $sformatf("row %0d H/E", j));
      check(int'(row_link.row_best) == m.row_best[j] && int'(row_link.row_best_col) == m.row_col[j],
            $sformatf("row %0d best %0d@%0d vs %0d@%0d", j, int'(row_link.row_best), row_link.row_best_col, m.row_best[j], m.row_col[j]));
      check(row_link.flags[FLAG_LAST] == (j == RN), "last-row flag");
      rows_seen++;
    end
  end

  initial begin
    make_seqs(QN, RN, 3, qs, rs);
    m = new(qs, rs);
    m.run();
    foreach (q_mem[i]) q_mem[i] = qs[i];
    foreach (rs[j]) r_mem[j] = rs[j];
    r_mem[RN] = 0;
    start = 0; qlen = QN; rlen = RN;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(rows_seen == RN, $sformatf("rows of last partition %0d", rows_seen));
    check(partitions == 3 && opens == 3, "three partitions");
    check(darm_n_records == 3 * N, "retrieval over all records");
    for (int a = 0; a < 3 * N; a++) begin
      int col;
      col = a + 1;
      check(pss_mem.exists(a), $sformatf("record %0d stored", a));
      if (pss_mem.exists(a)) begin
        if (col <= QN)
          check(int'(pss_mem[a].best_col) == col && int'(pss_mem[a].best_score) == m.col_best[col] &&
                int'(pss_mem[a].best_row) == m.col_row[col], $sformatf("record %0d: %0d@%0d vs %0d@%0d", a,
                int'(pss_mem[a].best_score), pss_mem[a].best_row, m.col_best[col], m.col_row[col]));
        else
          check(pss_mem[a].best_col == 0, "bypass PE record");
      end
    end
    check(out_stall_cycles > 0, $sformatf("output stalls %0d", out_stall_cycles));
    check(in_stall_cycles > 0, $sformatf("input bubbles %0d", in_stall_cycles));
    check(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
