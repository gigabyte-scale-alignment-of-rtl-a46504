// tb_darm: self-checking test of the alignment retrieval module.
//
// A storage model holds 30 random end-state records (some of unused PEs)
// and answers reads one or more cycles later with random request
// readiness. The mappings emitted must be exactly the used records whose
// score reaches the threshold, in address order; hits and the overall best
// must match; done must pulse once. A second run with zero records must
// finish at once. With an always-ready store the run must take
// n_records + 2 cycles.
module tb_darm;
  import dialign_pkg::*;

  localparam int NREC = 30;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      start, busy, rd_req_valid, rd_req_ready, rd_resp_valid, aln_valid, done;
  word_t     n_records, rd_req_addr, aln_query_pos, aln_ref_pos, hits, best_query_pos, best_ref_pos;
  score_t    threshold, aln_score, best_score;
  pe_state_t rd_resp_data;

  int checks = 0;
  int failures = 0;
  bit always_ready = 0;

  darm dut (.*);

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

  pe_state_t store [NREC];
  always @(posedge clk) begin
    rd_req_ready  <= always_ready || ($urandom_range(2) != 0);
    rd_resp_valid <= rd_req_valid && rd_req_ready;
    rd_resp_data  <= store[int'(rd_req_addr) % NREC];
  end

  initial begin
    pe_state_t exp_q[$];
    int exp_hits, cyc, dones;
    score_t exp_best;
    word_t exp_bq, exp_br;
    start = 0; n_records = NREC; threshold = 32'sd6;
    rd_req_ready = 0; rd_resp_valid = 0; rd_resp_data = '0;
    exp_hits = 0; exp_best = 0; exp_bq = 0; exp_br = 0;
    for (int a = 0; a < NREC; a++) begin
      store[a].best_score = score_t'($urandom_range(12));
      store[a].best_row   = word_t'($urandom_range(1000));
      store[a].best_col   = ($urandom_range(4) == 0) ? '0 : word_t'(a + 1);
      store[a].query_char = word_t'(8'h41);
      if (store[a].best_col != 0) begin
        if (store[a].best_score >= threshold) begin
          exp_q.push_back(store[a]);
          exp_hits++;
        end
        if (store[a].best_score > exp_best) begin
          exp_best = store[a].best_score;
          exp_bq = store[a].best_col;
          exp_br = store[a].best_row;
        end
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int run = 0; run < 2; run++) begin
      pe_state_t q[$];
      q = exp_q;
      always_ready = (run == 1);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1; dones = 0;
      while (dones == 0 && cyc < 1000) begin
        if (aln_valid) begin
          check(q.size() != 0, "unexpected mapping");
          if (q.size() != 0) begin
            check(aln_query_pos == q[0].best_col && aln_ref_pos == q[0].best_row && aln_score == q[0].best_score,
                  $sformatf("mapping %0d->%0d (%0d)", aln_query_pos, aln_ref_pos, aln_score));
            void'(q.pop_front());
          end
        end
        if (done) dones++;
        @(negedge clk);
        cyc++;
      end
      check(dones == 1 && q.size() == 0, "all mappings, one done");
      check(hits == word_t'(exp_hits), $sformatf("hits %0d vs %0d", hits, exp_hits));
      check(best_score == exp_best && best_query_pos == exp_bq && best_ref_pos == exp_br, "overall best");
      if (run == 1) check(cyc - 1 == NREC + 2, $sformatf("retrieval took %0d cycles", cyc - 1));
    end
    n_records = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    check(done && !busy, "empty retrieval");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
