// dram_chan_model: behavioural DRAM channel for testbenches (not
// synthesizable).
//
// Serves one write channel and one read channel. Each channel is ready on
// READY_PCT percent of cycles (100 = always). A write stores its word at
// once; an accepted read returns the stored word exactly LAT cycles later
// (LAT >= 1), responses in request order. Unwritten addresses read as zero.
// n_writes/n_reads count the accepted requests; max_addr is the highest
// address written.
module dram_chan_model #(
  parameter int unsigned W         = 224,
  parameter int unsigned LAT       = 6,
  parameter int unsigned READY_PCT = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  logic [31:0]  wr_addr,
  input  logic [W-1:0] wr_data,
  input  logic         rd_valid,
  output logic         rd_ready,
  input  logic [31:0]  rd_addr,
  output logic         rd_resp_valid,
  output logic [W-1:0] rd_resp_data,
  output int           n_writes,
  output int           n_reads,
  output int           max_addr
);

  logic [W-1:0] mem [int];
  logic [W-1:0] pipe_d [LAT];
  logic [LAT-1:0] pipe_v;

  initial begin
    wr_ready = 1'b0; rd_ready = 1'b0; pipe_v = '0;
    n_writes = 0; n_reads = 0; max_addr = -1;
  end

  assign rd_resp_valid = pipe_v[LAT-1];
  assign rd_resp_data  = pipe_d[LAT-1];

  always @(posedge clk) begin
    if (rst_n) begin
      if (wr_valid && wr_ready) begin
        mem[int'(wr_addr)] = wr_data;
        n_writes++;
        if (int'(wr_addr) > max_addr) max_addr = int'(wr_addr);
      end
      for (int k = LAT - 1; k > 0; k--) begin
        pipe_v[k] <= pipe_v[k-1];
        pipe_d[k] <= pipe_d[k-1];
      end
      pipe_v[0] <= rd_valid && rd_ready;
      pipe_d[0] <= mem.exists(int'(rd_addr)) ? mem[int'(rd_addr)] : '0;
      if (rd_valid && rd_ready) n_reads++;
      wr_ready <= ($urandom_range(99) < READY_PCT);
      rd_ready <= ($urandom_range(99) < READY_PCT);
    end
  end

endmodule
