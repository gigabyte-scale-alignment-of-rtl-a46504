// tb_drive_scaling: the storage-bandwidth workload, two drive systems side
// by side on the same 100-PE accelerator.
//
// The link between partitions needs 28 bytes per cycle each way, 2800 MB/s
// at 100 MHz.
//   prototype:    2 drives (one per half) on 3 Gb/s SATA, about 300 MB/s
//                 each, so a drive takes a word on 11% of cycles;
//   extrapolated: 10 drives (five per half) on 6 Gb/s SATA, about 600 MB/s
//                 each, so a drive takes a word on 21% of cycles, and a
//                 half offers about 107% of what the link needs.
// Each drive's write buffer is a DRAM ring (always-ready DRAM model).
// Both run a 450-character query (5 partitions) against a 300-character
// reference, and both results are checked against the software model. The
// prototype must fall below 30% of the stall-free run time; the ten-drive
// system must reach at least 80% of it (measured 83-87%; the rest is
// drive command and DRAM read latency at each partition change).
module tb_drive_scaling;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic go = 1'b0;
  always #5 clk = ~clk;

  logic fin_a, fin_b;
  int   chk_a, chk_b, fail_a, fail_b, run_a, run_b, ideal_a, ideal_b;
  int   checks = 0;
  int   failures = 0;

  accel_harness #(.N_DRIVES(2), .READY_PCT(11)) u_proto (
    .clk(clk), .rst_n(rst_n), .go(go), .finished(fin_a),
    .checks(chk_a), .failures(fail_a), .run_cycles_o(run_a), .ideal_cycles_o(ideal_a)
  );

  accel_harness #(.N_DRIVES(10), .READY_PCT(21)) u_ten (
    .clk(clk), .rst_n(rst_n), .go(go), .finished(fin_b),
    .checks(chk_b), .failures(fail_b), .run_cycles_o(run_b), .ideal_cycles_o(ideal_b)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_a + chk_b, failures + fail_a + fail_b);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    go = 1;
    wait (fin_a && fin_b);
    $display("2 drives: run %0d cycles, stall-free %0d (%0d%%)", run_a, ideal_a, 100 * ideal_a / run_a);
    $display("10 drives: run %0d cycles, stall-free %0d (%0d%%)", run_b, ideal_b, 100 * ideal_b / run_b);
    check(100 * ideal_a < 30 * run_a, "two drives cannot sustain the link");
    check(100 * ideal_b >= 80 * run_b, "ten drives sustain the link");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_a + chk_b, failures + fail_a + fail_b);
    $finish;
  end
endmodule
