// tb_stream_fifo: self-checking test of the drive buffer.
//
// Random pushes and pops against a queue model: every popped word must be
// the oldest pushed, level must equal the model's count, the buffer must
// refuse a push only when full and not popping, and a full buffer must
// accept a push in the same cycle as a pop.
module tb_stream_fifo;
  localparam int W = 16;
  localparam int D = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0]         in_data, out_data;
  logic [$clog2(D):0]   level;

  int checks = 0;
  int failures = 0;
  int full_seen = 0;
  int full_pass = 0;

  stream_fifo #(.W(W), .DEPTH(D)) dut (.*);

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
    logic [W-1:0] q[$];
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      // phases: fill-biased, drain-biased, balanced
      int pw, pr;
      pw = (c % 600 < 200) ? 90 : (c % 600 < 400) ? 20 : 60;
      pr = (c % 600 < 200) ? 20 : (c % 600 < 400) ? 90 : 60;
      in_valid  = ($urandom_range(99) < pw);
      out_ready = ($urandom_range(99) < pr);
      in_data   = W'($urandom);
      #1;
      check(int'(level) == q.size(), $sformatf("level %0d vs %0d", level, q.size()));
      check(out_valid == (q.size() != 0), "out_valid");
      check(in_ready == (q.size() < D || out_ready), "in_ready");
      if (q.size() == D) begin
        full_seen++;
        if (in_valid && out_ready) full_pass++;
      end
      if (out_valid && out_ready) begin
        check(out_data == q[0], $sformatf("data %h vs %h", out_data, q[0]));
        void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_data);
      @(negedge clk);
    end
    check(full_seen > 0 && full_pass > 0, "full buffer exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
