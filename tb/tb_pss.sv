// tb_pss: self-checking test of the Partition-State-Storage.
//
// With 16 on-chip records, 40 records are written at addresses 0..39 (the
// last 24 spill to a DRAM model with random readiness and 3-6 cycles of
// read latency) and read back in order. Checks: data and order of every
// response, spilled writes reach DRAM at address - 16, no on-chip access
// reaches DRAM, and on-chip reads sustain one record per cycle.
module tb_pss;
  import dialign_pkg::*;

  localparam int OC = 16;
  localparam int NREC = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      wr_valid, wr_ready, rd_req_valid, rd_req_ready, rd_resp_valid;
  word_t     wr_addr, rd_req_addr;
  pe_state_t wr_data, rd_resp_data;
  logic      dram_wr_valid, dram_wr_ready, dram_rd_valid, dram_rd_ready, dram_rd_resp_valid;
  word_t     dram_wr_addr, dram_rd_addr;
  pe_state_t dram_wr_data, dram_rd_resp_data;

  int checks = 0;
  int failures = 0;

  pss #(.ONCHIP_DEPTH(OC)) dut (.*);

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

  // DRAM model
  pe_state_t dram [int];
  int        dram_writes = 0;
  int        lat = 0;
  pe_state_t lat_data;
  always @(posedge clk) begin
    dram_wr_ready <= ($urandom_range(2) != 0);
    dram_rd_ready <= ($urandom_range(1) != 0) && (lat == 0);
    dram_rd_resp_valid <= 1'b0;
    if (dram_wr_valid && dram_wr_ready) begin
      dram[int'(dram_wr_addr)] = dram_wr_data;
      dram_writes++;
    end
    if (dram_rd_valid && dram_rd_ready) begin
      lat <= $urandom_range(6, 3);
      lat_data <= dram.exists(int'(dram_rd_addr)) ? dram[int'(dram_rd_addr)] : '0;
    end else if (lat == 1) begin
      dram_rd_resp_valid <= 1'b1;
      dram_rd_resp_data  <= lat_data;
      lat <= 0;
    end else if (lat > 1) begin
      lat <= lat - 1;
    end
  end

  function automatic pe_state_t rec(int a);
    return '{best_score: score_t'(a * 3 + 1), best_row: word_t'(a * 7), best_col: word_t'(a + 1), query_char: word_t'(a ^ 32'h5a)};
  endfunction

  initial begin
    int n_resp, first_resp_cyc, last_onchip_cyc, cyc;
    wr_valid = 0; wr_addr = 0; wr_data = '0; rd_req_valid = 0; rd_req_addr = 0;
    dram_wr_ready = 0; dram_rd_ready = 0; dram_rd_resp_valid = 0; dram_rd_resp_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // writes
    for (int a = 0; a < NREC; a++) begin
      wr_valid = 1; wr_addr = word_t'(a); wr_data = rec(a);
      #1;
      check(dram_wr_valid == (a >= OC), "spill decision on write");
      if (a >= OC) check(dram_wr_addr == word_t'(a - OC), "DRAM write address");
      while (!wr_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    wr_valid = 0;
    @(negedge clk);
    check(dram_writes == NREC - OC, $sformatf("DRAM writes %0d", dram_writes));
    // reads, back to back
    fork
      begin
        for (int a = 0; a < NREC; a++) begin
          rd_req_valid = 1; rd_req_addr = word_t'(a);
          #1;
          while (!rd_req_ready) begin
            @(negedge clk);
            #1;
          end
          @(negedge clk);
        end
        rd_req_valid = 0;
      end
      begin
        n_resp = 0; cyc = 0; first_resp_cyc = -1; last_onchip_cyc = -1;
        while (n_resp < NREC && cyc < 2000) begin
          @(posedge clk);
          #2;
          cyc++;
          if (rd_resp_valid) begin
            check(rd_resp_data == rec(n_resp), $sformatf("read record %0d", n_resp));
            if (n_resp == 0) first_resp_cyc = cyc;
            if (n_resp == OC - 1) last_onchip_cyc = cyc;
            n_resp++;
          end
        end
        check(n_resp == NREC, "all responses");
        check(last_onchip_cyc - first_resp_cyc == OC - 1, $sformatf("on-chip read rate: %0d cycles for %0d", last_onchip_cyc - first_resp_cyc + 1, OC));
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
