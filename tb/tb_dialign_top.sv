// tb_dialign_top: end-to-end test of the accelerator at its default size
// (100 PEs, two drives, 1600 on-chip state records).
//
// A 1730-character query is aligned against a 200-character reference
// (18 partitions, the last one with 70 bypass PEs). The two drive models
// accept or deliver a word on about 11% of cycles, the ratio of two 3 Gb/s
// SATA links (300 MB/s each way) to the 2800 MB/s each way that the
// 28-byte link needs at 100 MHz, so the array stalls on storage most of the
// time. Each drive's write buffer lives in a DRAM channel model (8-cycle
// read latency); its ring is large enough for a whole partition, so the
// array is not held by the write side during a partition but waits at the
// next partition's start until the drives have taken everything. Partition
// states beyond 1600 records spill to a DRAM model.
//
// Checks against a software Smith-Waterman model:
//   - every row leaving the last partition (H, E, row best and its column);
//   - every mapping of the retrieval output (query column -> best row and
//     score, for scores >= threshold, in column order), hits and best;
//   - partition count, FIFO traffic per drive, DRAM spill count, and that
//     every drive word passed through the drive's DRAM buffer;
//   - cycle accounting: run cycles = stalls + bubbles + partitions x
//     (rows + N_PE), i.e. one row per cycle whenever nothing holds the array.
// Mechanisms counted and required to occur: wait for the drive buffers to
// flush at a partition start, input bubble,
// bypass PE, half swap of the drives, PSS spill to DRAM, drive
// backpressure, threshold hits and threshold misses.
module tb_dialign_top;
  import dialign_pkg::*;
  import sw_ref_pkg::*;

  localparam int QN = 1730;
  localparam int RN = 200;
  localparam int NPE = 100;
  localparam int ND = 2;
  localparam int ONCHIP = 1600;
  localparam score_t THR = 32'sd14;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start, busy, done;
  word_t         qlen, rlen, partitions, run_cycles, in_stall_cycles, out_stall_cycles;
  score_t        threshold;
  logic          q_req_valid, q_resp_valid;
  word_t         q_req_addr;
  char_t         q_resp_char;
  logic          ref_valid, ref_ready;
  char_t         ref_char;
  logic [ND-1:0] drv_cmd_valid, drv_cmd_write, drv_cmd_ready;
  logic [ND-1:0] drv_wr_valid, drv_wr_ready, drv_rd_valid, drv_rd_ready;
  link_t         drv_wr_data [ND];
  link_t         drv_rd_data [ND];
  logic [ND-1:0] dbuf_wr_valid, dbuf_wr_ready, dbuf_rd_valid, dbuf_rd_ready, dbuf_rd_resp_valid;
  word_t         dbuf_wr_addr [ND];
  word_t         dbuf_rd_addr [ND];
  link_t         dbuf_wr_data [ND];
  link_t         dbuf_rd_resp_data [ND];
  int            dbuf_writes [ND];
  int            dbuf_reads [ND];
  int            dbuf_max_addr [ND];
  logic          pss_dram_wr_valid, pss_dram_wr_ready, pss_dram_rd_valid, pss_dram_rd_ready;
  word_t         pss_dram_wr_addr, pss_dram_rd_addr;
  pe_state_t     pss_dram_wr_data, pss_dram_rd_resp_data;
  logic          pss_dram_rd_resp_valid;
  logic          row_valid, aln_valid;
  link_t         row_link;
  word_t         aln_query_pos, aln_ref_pos, hits, best_query_pos, best_ref_pos;
  score_t        aln_score, best_score;
  int            n_writes [ND];
  int            n_reads [ND];
  int            n_cmds [ND];

  int checks = 0;
  int failures = 0;

  dialign_top dut (.*);

  for (genvar d = 0; d < ND; d++) begin : g_dbuf
    dram_chan_model #(.W(LINK_W), .LAT(8), .READY_PCT(100)) u_dram (
      .clk           (clk),
      .rst_n         (rst_n),
      .wr_valid      (dbuf_wr_valid[d]),
      .wr_ready      (dbuf_wr_ready[d]),
      .wr_addr       (dbuf_wr_addr[d]),
      .wr_data       (dbuf_wr_data[d]),
      .rd_valid      (dbuf_rd_valid[d]),
      .rd_ready      (dbuf_rd_ready[d]),
      .rd_addr       (dbuf_rd_addr[d]),
      .rd_resp_valid (dbuf_rd_resp_valid[d]),
      .rd_resp_data  (dbuf_rd_resp_data[d]),
      .n_writes      (dbuf_writes[d]),
      .n_reads       (dbuf_reads[d]),
      .max_addr      (dbuf_max_addr[d])
    );
  end

  for (genvar d = 0; d < ND; d++) begin : g_ssd
    ssd_model #(.DEPTH(RN), .READY_PCT(11)) u_ssd (
      .clk       (clk),
      .rst_n     (rst_n),
      .cmd_valid (drv_cmd_valid[d]),
      .cmd_write (drv_cmd_write[d]),
      .cmd_ready (drv_cmd_ready[d]),
      .wr_valid  (drv_wr_valid[d]),
      .wr_ready  (drv_wr_ready[d]),
      .wr_data   (drv_wr_data[d]),
      .rd_valid  (drv_rd_valid[d]),
      .rd_ready  (drv_rd_ready[d]),
      .rd_data   (drv_rd_data[d]),
      .n_writes  (n_writes[d]),
      .n_reads   (n_reads[d]),
      .n_cmds    (n_cmds[d])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned qs[], rs[];
  byte unsigned q_mem [QN];
  byte unsigned r_mem [RN+1];
  sw_model m;

  // query memory, one cycle of latency
  always_ff @(posedge clk) begin
    q_resp_valid <= q_req_valid;
    q_resp_char  <= char_t'(q_mem[int'(q_req_addr) % QN]);
  end

  // reference source: one character per cycle with occasional gaps
  int ref_pos = 0;
  always_ff @(posedge clk) if (ref_valid && ref_ready) ref_pos <= ref_pos + 1;
  assign ref_char  = char_t'(r_mem[ref_pos]);
  logic ref_gate;
  always_ff @(posedge clk) ref_gate <= ($urandom_range(9) != 0);
  assign ref_valid = ref_gate && (ref_pos < RN);

  // DRAM model for the PSS spill region
  pe_state_t dram [int];
  int        dram_writes = 0;
  int        dram_reads = 0;
  int        lat = 0;
  pe_state_t lat_data;
  always @(posedge clk) begin
    pss_dram_wr_ready <= ($urandom_range(2) != 0);
    pss_dram_rd_ready <= (lat == 0);
    pss_dram_rd_resp_valid <= 1'b0;
    if (pss_dram_wr_valid && pss_dram_wr_ready) begin
      dram[int'(pss_dram_wr_addr)] = pss_dram_wr_data;
      dram_writes++;
    end
    if (pss_dram_rd_valid && pss_dram_rd_ready) begin
      lat <= $urandom_range(8, 4);
      lat_data <= dram.exists(int'(pss_dram_rd_addr)) ? dram[int'(pss_dram_rd_addr)] : '0;
      dram_reads++;
    end else if (lat == 1) begin
      pss_dram_rd_resp_valid <= 1'b1;
      pss_dram_rd_resp_data  <= lat_data;
      lat <= 0;
    end else if (lat > 1) begin
      lat <= lat - 1;
    end
  end

  // mechanism counters
  int n_flush_wait = 0;
  int n_out_stall = 0, n_bubble = 0, n_bypass = 0, n_swaps = 0, n_backpressure = 0;
  int n_hits = 0, n_misses = 0;
  logic last_half;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_pfifo.part_start) begin
      if (n_swaps == 0 || dut.u_pfifo.wr_half != last_half) n_swaps++;
      last_half = dut.u_pfifo.wr_half;
    end
    if (|(drv_wr_valid & ~drv_wr_ready)) n_backpressure++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_OPEN && !dut.pf_flushed) n_flush_wait++;
    if (dut.arr_q_shift && !dut.arr_q_active) n_bypass++;
  end

  // last-partition rows
  int rows_seen = 0;
  always @(posedge clk) begin
    if (rst_n && row_valid && dut.arr_en) begin
      int j;
      j = rows_seen + 1;
      check(int'(row_link.row) == j, "row order");
      check(int'(row_link.h) == m.h[j][QN] && int'(row_link.e) == m.e[j][QN], $sformatf("row %0d H/E", j));
      check(int'(row_link.row_best) == m.row_best[j] && int'(row_link.row_best_col) == m.row_col[j],
            $sformatf("row %0d best %0d@%0d vs %0d@%0d", j, int'(row_link.row_best), row_link.row_best_col, m.row_best[j], m.row_col[j]));
      rows_seen++;
    end
  end

  // retrieval output
  int next_col = 1;
  always @(posedge clk) begin
    if (rst_n && aln_valid) begin
      while (next_col <= QN && m.col_best[next_col] < THR) next_col++;
      check(next_col <= QN && int'(aln_query_pos) == next_col && int'(aln_ref_pos) == m.col_row[next_col] &&
            int'(aln_score) == m.col_best[next_col],
            $sformatf("mapping %0d->%0d (%0d), expected column %0d", aln_query_pos, aln_ref_pos, aln_score, next_col));
      next_col++;
    end
  end

  initial begin
    int exp_hits, exp_best, exp_bq, exp_br, cycles;
    make_seqs(QN, RN, 4, qs, rs);
    m = new(qs, rs);
    m.run();
    foreach (q_mem[i]) q_mem[i] = qs[i];
    foreach (rs[j]) r_mem[j] = rs[j];
    r_mem[RN] = 0;
    exp_hits = 0; exp_best = 0; exp_bq = 0; exp_br = 0;
    for (int i = 1; i <= QN; i++) begin
      if (m.col_best[i] >= THR) exp_hits++;
      if (m.col_best[i] > exp_best) begin
        exp_best = m.col_best[i]; exp_bq = i; exp_br = m.col_row[i];
      end
    end
    start = 0; qlen = QN; rlen = RN; threshold = THR;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    n_out_stall = int'(out_stall_cycles);
    n_bubble    = int'(in_stall_cycles);
    n_hits      = int'(hits);
    n_misses    = QN - int'(hits);
    check(rows_seen == RN, $sformatf("rows of last partition %0d", rows_seen));
    check(int'(partitions) == (QN + NPE - 1) / NPE, $sformatf("partitions %0d", partitions));
    check(int'(hits) == exp_hits, $sformatf("hits %0d vs %0d", hits, exp_hits));
    check(int'(best_score) == exp_best && int'(best_query_pos) == exp_bq && int'(best_ref_pos) == exp_br,
          $sformatf("best %0d at %0d->%0d vs %0d at %0d->%0d", best_score, best_query_pos, best_ref_pos, exp_best, exp_bq, exp_br));
    check(dram_writes == int'(partitions) * NPE - ONCHIP && dram_reads == dram_writes,
          $sformatf("DRAM spill writes %0d reads %0d", dram_writes, dram_reads));
    check(n_writes[0] + n_writes[1] == (int'(partitions) - 1) * RN, "drive writes: one link word per row and partition");
    check(n_reads[0] + n_reads[1] == (int'(partitions) - 1) * RN, "drive reads: one link word per row and partition");
    check(run_cycles == out_stall_cycles + in_stall_cycles + partitions * word_t'(RN + NPE),
          $sformatf("cycle accounting: run %0d, stalls %0d, bubbles %0d", run_cycles, out_stall_cycles, in_stall_cycles));
    check(n_flush_wait > 0, "wait for buffer flush at partition start occurred");
    check(dbuf_writes[0] + dbuf_writes[1] == n_writes[0] + n_writes[1] && dbuf_reads[0] + dbuf_reads[1] == dbuf_writes[0] + dbuf_writes[1],
          $sformatf("drive buffer DRAM writes %0d reads %0d", dbuf_writes[0] + dbuf_writes[1], dbuf_reads[0] + dbuf_reads[1]));
    check(n_bubble > 0, "input bubble occurred");
    check(n_bypass == int'(partitions) * NPE - QN, $sformatf("bypass PEs loaded %0d", n_bypass));
    check(n_swaps == int'(partitions), $sformatf("drive half swaps %0d", n_swaps));
    check(dram_writes > 0, "PSS spill occurred");
    check(n_backpressure > 0, "drive backpressure occurred");
    check(n_hits > 0 && n_misses > 0, "threshold hit and miss occurred");
    $display("run cycles %0d for %0d partitions x %0d rows: %0d%% of the stall-free rate (%0d output stalls, %0d input bubbles), total %0d cycles",
             run_cycles, partitions, RN, 100 * int'(partitions) * (RN + NPE) / int'(run_cycles), out_stall_cycles, in_stall_cycles, cycles);
    $display("mechanisms: flush wait %0d stall %0d bubble %0d bypass %0d swaps %0d spill %0d backpressure %0d hits %0d misses %0d",
             n_flush_wait, n_out_stall, n_bubble, n_bypass, n_swaps, dram_writes, n_backpressure, n_hits, n_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
