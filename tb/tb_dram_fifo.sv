// tb_dram_fifo: self-checking test of the DRAM-backed drive write buffer.
//
// A 40-word ring and an 8-word cache sit on a DRAM channel model with a
// 5-cycle read latency. Phase 1: 600 random words with random input
// validity, random drive readiness and DRAM channels ready on 60% of
// cycles; the output must be the input in order, the ring must fill at
// least once (input refused because it is full), no DRAM address may leave
// the ring, and empty must rise at the end. Phase 2: with always-ready
// channels and an always-ready drive, 200 back-to-back words must pass in
// at most 200 + 12 cycles.
module tb_dram_fifo;

  localparam int W    = 64;
  localparam int RING = 40;
  localparam int LAT  = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid, in_ready, out_valid, out_ready, empty;
  logic [W-1:0] in_data, out_data;
  logic         mem_wr_valid, mem_wr_ready, mem_rd_valid, mem_rd_ready, mem_rd_resp_valid;
  logic [31:0]  mem_wr_addr, mem_rd_addr;
  logic [W-1:0] mem_wr_data, mem_rd_resp_data;
  logic         wr_ready_a, rd_ready_a, wr_ready_b, rd_ready_b;
  logic         resp_valid_a, resp_valid_b;
  logic [W-1:0] resp_data_a, resp_data_b;
  int           nw_a, nr_a, max_a, nw_b, nr_b, max_b;
  bit           fast = 0;

  int checks = 0;
  int failures = 0;

  dram_fifo #(.W(W), .RING_DEPTH(RING), .CACHE_DEPTH(8)) dut (.*);

  // two DRAM models on the same ring: a slow one for phase 1, an always-
  // ready one for phase 2 (each sees requests only in its own phase)
  dram_chan_model #(.W(W), .LAT(LAT), .READY_PCT(60)) u_slow (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(mem_wr_valid && !fast), .wr_ready(wr_ready_a), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_valid(mem_rd_valid && !fast), .rd_ready(rd_ready_a), .rd_addr(mem_rd_addr),
    .rd_resp_valid(resp_valid_a), .rd_resp_data(resp_data_a),
    .n_writes(nw_a), .n_reads(nr_a), .max_addr(max_a)
  );
  dram_chan_model #(.W(W), .LAT(LAT), .READY_PCT(100)) u_fast (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(mem_wr_valid && fast), .wr_ready(wr_ready_b), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_valid(mem_rd_valid && fast), .rd_ready(rd_ready_b), .rd_addr(mem_rd_addr),
    .rd_resp_valid(resp_valid_b), .rd_resp_data(resp_data_b),
    .n_writes(nw_b), .n_reads(nr_b), .max_addr(max_b)
  );
  assign mem_wr_ready      = fast ? wr_ready_b : wr_ready_a;
  assign mem_rd_ready      = fast ? rd_ready_b : rd_ready_a;
  assign mem_rd_resp_valid = resp_valid_a || resp_valid_b;
  assign mem_rd_resp_data  = resp_valid_b ? resp_data_b : resp_data_a;

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

  logic [W-1:0] exp_q[$];
  int           n_out = 0;
  int           n_full = 0;
  bit           src_on = 0;
  bit           sink_rand = 1;
  int           n_src = 0;
  int           src_limit = 0;

  // source: in_data holds until accepted
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        exp_q.push_back(in_data);
        n_src++;
      end
      if (in_valid && !in_ready && int'(dut.used) == RING) n_full++;
      if (!in_valid || in_ready) begin
        in_valid <= src_on && (n_src < src_limit) && (fast || $urandom_range(3) != 0);
        in_data  <= {$urandom, $urandom};
      end
      out_ready <= !sink_rand || ($urandom_range(2) == 0);
    end
  end

  // sink
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(exp_q.size() != 0 && out_data == exp_q[0], $sformatf("word %0d", n_out));
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_out++;
    end
  end

  initial begin
    int cyc;
    in_valid = 0; in_data = '0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !out_valid, "empty after reset");

    // phase 1
    src_limit = 600; src_on = 1;
    cyc = 0;
    while (n_out < 600 && cyc < 20000) begin
      @(negedge clk);
      cyc++;
      if (cyc == 3000) sink_rand = 0;
    end
    src_on = 0;
    repeat (2) @(negedge clk);
    check(n_out == 600, $sformatf("phase 1 delivered %0d of 600", n_out));
    check(n_full > 0, "ring filled and refused input");
    check(max_a >= 0 && max_a < RING && max_b < RING, $sformatf("DRAM addresses inside the ring (max %0d)", max_a));
    check(nw_a == 600 && nr_a == 600, $sformatf("DRAM writes %0d reads %0d", nw_a, nr_a));
    check(empty, "empty after draining");

    // phase 2
    fast = 1; sink_rand = 0;
    repeat (3) @(negedge clk);
    n_out = 0; n_src = 0; src_limit = 200; src_on = 1;
    cyc = 0;
    while (n_out < 200 && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    src_on = 0;
    check(n_out == 200, "phase 2 delivered all");
    check(cyc <= 200 + 12, $sformatf("phase 2 took %0d cycles for 200 words", cyc));
    repeat (2) @(negedge clk);
    check(empty, "empty at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
