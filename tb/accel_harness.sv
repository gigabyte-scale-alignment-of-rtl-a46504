// accel_harness: the accelerator with behavioural surroundings, for
// workload testbenches (not synthesizable).
//
// Instantiates dialign_top with N_DRIVES drive models that accept or
// deliver a word on READY_PCT percent of cycles, a query memory, a
// reference source and a DRAM model for the state-storage spill region.
// On start it generates a QN-character query and an RN-character
// reference, runs one alignment and checks every row of the last partition
// and every retrieval mapping against the software model. finished rises
// when the run is over; checks/failures count the comparisons, and
// run_cycles/ideal_cycles give the measured and stall-free time of the
// partition phases (waiting for the FIFO at a partition start, plus
// scoring). Each drive's write buffer has its own always-ready DRAM
// channel model with an 8-cycle read latency.
module accel_harness
  import dialign_pkg::*;
  import sw_ref_pkg::*;
#(
  parameter int unsigned N_DRIVES  = 2,
  parameter int unsigned READY_PCT = 11,
  parameter int          QN        = 450,
  parameter int          RN        = 300,
  parameter int          NPE       = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   run_cycles_o,
  output int   ideal_cycles_o
);

  localparam score_t THR = 32'sd14;

  logic                start, busy, done;
  word_t               qlen, rlen, partitions, run_cycles, in_stall_cycles, out_stall_cycles;
  score_t              threshold;
  logic                q_req_valid, q_resp_valid;
  word_t               q_req_addr;
  char_t               q_resp_char;
  logic                ref_valid, ref_ready;
  char_t               ref_char;
  logic [N_DRIVES-1:0] drv_cmd_valid, drv_cmd_write, drv_cmd_ready;
  logic [N_DRIVES-1:0] drv_wr_valid, drv_wr_ready, drv_rd_valid, drv_rd_ready;
  link_t               drv_wr_data [N_DRIVES];
  link_t               drv_rd_data [N_DRIVES];
  logic [N_DRIVES-1:0] dbuf_wr_valid, dbuf_wr_ready, dbuf_rd_valid, dbuf_rd_ready, dbuf_rd_resp_valid;
  word_t         dbuf_wr_addr [N_DRIVES];
  word_t         dbuf_rd_addr [N_DRIVES];
  link_t         dbuf_wr_data [N_DRIVES];
  link_t         dbuf_rd_resp_data [N_DRIVES];
  int            dbuf_writes [N_DRIVES];
  int            dbuf_reads [N_DRIVES];
  int            dbuf_max_addr [N_DRIVES];
  logic                pss_dram_wr_valid, pss_dram_wr_ready, pss_dram_rd_valid, pss_dram_rd_ready;
  word_t               pss_dram_wr_addr, pss_dram_rd_addr;
  pe_state_t           pss_dram_wr_data, pss_dram_rd_resp_data;
  logic                pss_dram_rd_resp_valid;
  logic                row_valid, aln_valid;
  link_t               row_link;
  word_t               aln_query_pos, aln_ref_pos, hits, best_query_pos, best_ref_pos;
  score_t              aln_score, best_score;
  int                  n_writes [N_DRIVES];
  int                  n_reads [N_DRIVES];
  int                  n_cmds [N_DRIVES];

  dialign_top #(.N_PE(NPE), .N_DRIVES(N_DRIVES)) dut (.*);

  for (genvar d = 0; d < N_DRIVES; d++) begin : g_dbuf
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

  for (genvar d = 0; d < N_DRIVES; d++) begin : g_ssd
    ssd_model #(.DEPTH(RN), .READY_PCT(READY_PCT)) u_ssd (
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
      $display("FAIL (%0d drives): %s", N_DRIVES, what);
    end
  endtask

  byte unsigned qs[], rs[];
  byte unsigned q_mem [QN];
  byte unsigned r_mem [RN+1];
  sw_model m;

  always_ff @(posedge clk) begin
    q_resp_valid <= q_req_valid;
    q_resp_char  <= char_t'(q_mem[int'(q_req_addr) % QN]);
  end

  int ref_pos = 0;
  always_ff @(posedge clk) if (ref_valid && ref_ready) ref_pos <= ref_pos + 1;
  assign ref_char  = char_t'(r_mem[ref_pos]);
  assign ref_valid = (ref_pos < RN);

  // DRAM model: always ready, fixed 4-cycle read latency
  pe_state_t dram [int];
  logic [3:0] rd_pipe_v;
  pe_state_t  rd_pipe_d [4];
  assign pss_dram_wr_ready      = 1'b1;
  assign pss_dram_rd_ready      = 1'b1;
  assign pss_dram_rd_resp_valid = rd_pipe_v[3];
  assign pss_dram_rd_resp_data  = rd_pipe_d[3];
  always @(posedge clk) begin
    if (pss_dram_wr_valid) dram[int'(pss_dram_wr_addr)] = pss_dram_wr_data;
    rd_pipe_v <= {rd_pipe_v[2:0], pss_dram_rd_valid};
    rd_pipe_d[0] <= dram.exists(int'(pss_dram_rd_addr)) ? dram[int'(pss_dram_rd_addr)] : '0;
    for (int k = 1; k < 4; k++) rd_pipe_d[k] <= rd_pipe_d[k-1];
  end

  int open_run_cycles = 0;
  always @(posedge clk)
    if (rst_n && (dut.u_ctrl.state == dut.u_ctrl.S_OPEN || dut.u_ctrl.state == dut.u_ctrl.S_RUN)) open_run_cycles++;

  int rows_seen = 0;
  always @(posedge clk) begin
    if (rst_n && row_valid && dut.arr_en) begin
      int j;
      j = rows_seen + 1;
      check(int'(row_link.h) == m.h[j][QN] && int'(row_link.row_best) == m.row_best[j] &&
            int'(row_link.row_best_col) == m.row_col[j], $sformatf("row %0d", j));
      rows_seen++;
    end
  end

  int next_col = 1;
  always @(posedge clk) begin
    if (rst_n && aln_valid) begin
      while (next_col <= QN && m.col_best[next_col] < THR) next_col++;
      check(next_col <= QN && int'(aln_query_pos) == next_col && int'(aln_ref_pos) == m.col_row[next_col] &&
            int'(aln_score) == m.col_best[next_col], $sformatf("mapping for column %0d: got %0d->%0d (%0d) expected %0d->%0d (%0d)", next_col, aln_query_pos, aln_ref_pos, aln_score, next_col, m.col_row[next_col], m.col_best[next_col]));
      next_col++;
    end
  end

  initial begin
    checks = 0; failures = 0; finished = 0; run_cycles_o = 0; ideal_cycles_o = 0;
    start = 0; qlen = QN; rlen = RN; threshold = THR;
    rd_pipe_v = '0;
    make_seqs(QN, RN, 4, qs, rs);
    m = new(qs, rs);
    m.run();
    foreach (q_mem[i]) q_mem[i] = qs[i];
    foreach (rs[j]) r_mem[j] = rs[j];
    r_mem[RN] = 0;
    wait (go && rst_n);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(rows_seen == RN, "all rows of the last partition");
    check(int'(partitions) == (QN + NPE - 1) / NPE, "partition count");
    run_cycles_o   = open_run_cycles;
    ideal_cycles_o = int'(partitions) * (RN + NPE + 1);
    finished = 1;
  end

endmodule
