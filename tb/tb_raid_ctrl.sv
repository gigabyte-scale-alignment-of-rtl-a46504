// tb_raid_ctrl: self-checking test of the RAID controller.
//
// Four drives (two per half), stripe of 3 words. For each of three
// partitions the test checks the drive commands (write half = partition
// parity, read half = the other, none when inactive), that word n of the
// write stream goes to drive half*2 + (n/3 mod 2), and that the read stream
// takes words from the other half in the same stripe order. Drive ports are
// modelled by queues with random readiness.
module tb_raid_ctrl;
  localparam int ND = 4;
  localparam int NH = ND / 2;
  localparam int W  = 16;
  localparam int ST = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          part_start, wr_half, wr_active, rd_active, cmd_busy;
  logic          in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0]  in_data, out_data;
  logic [ND-1:0] drv_cmd_valid, drv_cmd_write, drv_cmd_ready;
  logic [ND-1:0] drv_wr_valid, drv_wr_ready, drv_rd_valid, drv_rd_ready;
  logic [W-1:0]  drv_wr_data;
  logic [W-1:0]  drv_rd_data [ND];

  int checks = 0;
  int failures = 0;

  raid_ctrl #(.N_DRIVES(ND), .W(W), .STRIPE(ST)) dut (.*);

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

  logic [W-1:0] drvq [ND][$];   // words each drive will deliver on read

  initial begin
    part_start = 0; wr_half = 0; wr_active = 0; rd_active = 0;
    in_valid = 0; in_data = 0; out_ready = 0;
    drv_cmd_ready = '0; drv_wr_ready = '0; drv_rd_valid = '0;
    for (int d = 0; d < ND; d++) drv_rd_data[d] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 3; p++) begin
      int n_wr, n_rd, total;
      logic [W-1:0] expect_rd [$];
      total = 20;
      // the read half delivers words striped in the expected order
      for (int d = 0; d < ND; d++) drvq[d].delete();
      expect_rd.delete();
      for (int n = 0; n < total; n++) begin
        int d;
        d = (p[0] ? 0 : NH) + (n / ST) % NH;
        drvq[d].push_back(W'(1000 * p + n));
        expect_rd.push_back(W'(1000 * p + n));
      end
      wr_half = p[0]; wr_active = (p != 2); rd_active = (p != 0);
      part_start = 1;
      @(negedge clk);
      part_start = 0;
      for (int d = 0; d < ND; d++) begin
        bit in_wr_half;
        in_wr_half = ((d >= NH) == p[0]);
        check(drv_cmd_valid[d] == (in_wr_half ? wr_active : rd_active), $sformatf("p%0d cmd valid drive %0d", p, d));
        if (drv_cmd_valid[d]) check(drv_cmd_write[d] == in_wr_half, $sformatf("p%0d cmd dir drive %0d", p, d));
      end
      check(cmd_busy == (wr_active || rd_active), "cmd_busy");
      drv_cmd_ready = '1;
      @(negedge clk);
      drv_cmd_ready = '0;
      check(!cmd_busy && drv_cmd_valid == '0, "commands taken");
      n_wr = 0; n_rd = 0;
      for (int c = 0; c < 400 && (n_wr < total || n_rd < total); c++) begin
        in_valid  = wr_active && (n_wr < total) && ($urandom_range(3) != 0);
        in_data   = W'(5000 + 100 * p + n_wr);
        out_ready = ($urandom_range(3) != 0);
        drv_wr_ready = ND'($urandom);
        for (int d = 0; d < ND; d++) begin
          drv_rd_valid[d] = rd_active && (drvq[d].size() != 0) && ($urandom_range(2) != 0);
          drv_rd_data[d]  = (drvq[d].size() != 0) ? drvq[d][0] : '0;
        end
        #1;
        if (in_valid) begin
          int exp_d;
          exp_d = (p[0] ? NH : 0) + (n_wr / ST) % NH;
          check($countones(drv_wr_valid) == 1 && drv_wr_valid[exp_d], $sformatf("p%0d word %0d to drive %0d", p, n_wr, exp_d));
          check(drv_wr_data == in_data, "write data");
          check(in_ready == drv_wr_ready[exp_d], "in_ready follows drive");
          if (in_ready) n_wr++;
        end
        for (int d = 0; d < ND; d++)
          if (drv_rd_valid[d] && drv_rd_ready[d]) void'(drvq[d].pop_front());
        if (out_valid && out_ready) begin
          check(out_data == expect_rd[0], $sformatf("p%0d read word %0d: %0d vs %0d", p, n_rd, out_data, expect_rd[0]));
          void'(expect_rd.pop_front());
          n_rd++;
        end
        @(negedge clk);
      end
      in_valid = 0; out_ready = 0; drv_rd_valid = '0;
      if (!rd_active) n_rd = total;
      if (!wr_active) n_wr = total;
      check(n_wr == total && n_rd == total, $sformatf("p%0d streams complete %0d %0d", p, n_wr, n_rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
