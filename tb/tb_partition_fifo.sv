// tb_partition_fifo: self-checking test of the drive-backed partition FIFO.
//
// Four drive models (two per half, random readiness), stripe of 4 words,
// 8-word read buffers, and per drive a write buffer in a 24-word DRAM ring
// (DRAM channel models ready on 70% of cycles, 5-cycle read latency). Three partitions: the first only writes 200 link words,
// the second reads them back while writing 200 new ones, the third only
// reads. Checks: read order and content, that a partition's data sits on
// the drives of the half it was written to (counted by the drive models),
// that flushed drops while writes are buffered and rises once they are on
// the drives, and that the write side was held up (backpressure) at least
// once because the drives are slower than the stream. Every drive word
// must pass through its DRAM ring, whose addresses stay below 24.
module tb_partition_fifo;
  import dialign_pkg::*;

  localparam int ND = 4;
  localparam int NWORDS = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          part_start, wr_half, wr_active, rd_active, flushed;
  logic          wr_valid, wr_ready, rd_valid, rd_ready;
  link_t         wr_data, rd_data;
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
  int            n_writes [ND];
  int            n_reads [ND];
  int            n_cmds [ND];

  int checks = 0;
  int failures = 0;

  partition_fifo #(.N_DRIVES(ND), .STRIPE(4), .BUF_DEPTH(8), .RING_DEPTH(24), .CACHE_DEPTH(4)) dut (.*);

  for (genvar d = 0; d < ND; d++) begin : g_dbuf
    dram_chan_model #(.W(LINK_W), .LAT(5), .READY_PCT(70)) u_dram (
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
    ssd_model #(.DEPTH(256), .READY_PCT(25)) u_ssd (
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
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic link_t word_of(int p, int n);
    link_t l;
    l = '0;
    l.ref_char = word_t'(32'h41 + n % 4);
    l.row = word_t'(n + 1);
    l.h = score_t'(p * 1000 + n);
    l.e = score_t'(-n);
    l.row_best = score_t'(p);
    l.row_best_col = word_t'(n * 3);
    l.flags = word_t'(n == NWORDS - 1);
    return l;
  endfunction

  initial begin
    int wr_stalls, half_writes[2];
    part_start = 0; wr_half = 0; wr_active = 0; rd_active = 0;
    wr_valid = 0; wr_data = '0; rd_ready = 0;
    wr_stalls = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 3; p++) begin
      int n_wr, n_rd, c;
      int w0 [ND];
      bit saw_unflushed;
      for (int d = 0; d < ND; d++) w0[d] = n_writes[d];
      check(flushed, $sformatf("p%0d flushed before open", p));
      wr_half = p[0]; wr_active = (p != 2); rd_active = (p != 0);
      part_start = 1;
      @(negedge clk);
      part_start = 0;
      n_wr = 0; n_rd = 0; saw_unflushed = 0;
      for (c = 0; c < 5000; c++) begin
        wr_valid = wr_active && (n_wr < NWORDS) && ($urandom_range(4) != 0);
        wr_data  = word_of(p, n_wr);
        rd_ready = rd_active && ($urandom_range(4) != 0);
        #1;
        if (wr_valid && !wr_ready) wr_stalls++;
        if (wr_valid && wr_ready) n_wr++;
        if (rd_valid && rd_ready) begin
          check(n_rd < NWORDS && rd_data == word_of(p - 1, n_rd), $sformatf("p%0d read word %0d", p, n_rd));
          n_rd++;
        end
        if (!flushed) saw_unflushed = 1;
        @(negedge clk);
        if ((!wr_active || n_wr == NWORDS) && (!rd_active || n_rd == NWORDS) && flushed) break;
      end
      wr_valid = 0; rd_ready = 0;
      check(c < 5000, $sformatf("p%0d finished", p));
      if (wr_active) begin
        int sum_half, sum_other;
        sum_half = 0; sum_other = 0;
        check(saw_unflushed, "flushed low while writes pending");
        for (int d = 0; d < ND; d++) begin
          if ((d >= ND / 2) == p[0]) sum_half += n_writes[d] - w0[d];
          else sum_other += n_writes[d] - w0[d];
        end
        check(sum_half == NWORDS && sum_other == 0, $sformatf("p%0d writes on half %0d: %0d/%0d", p, p % 2, sum_half, sum_other));
      end
      if (rd_active) check(n_rd == NWORDS, $sformatf("p%0d read %0d words", p, n_rd));
      @(negedge clk);
      check(!rd_valid, "nothing left to read");
    end
    begin
      int dw, dr, dm;
      dw = 0; dr = 0; dm = -1;
      for (int d = 0; d < ND; d++) begin
        dw += dbuf_writes[d];
        dr += dbuf_reads[d];
        if (dbuf_max_addr[d] > dm) dm = dbuf_max_addr[d];
      end
      check(dw == 2 * NWORDS && dr == dw, $sformatf("DRAM buffer writes %0d reads %0d", dw, dr));
      check(dm >= 0 && dm < 24, $sformatf("DRAM buffer addresses below 24 (max %0d)", dm));
    end
    check(wr_stalls > 0, $sformatf("drive backpressure seen %0d times", wr_stalls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
