// ssd_model: behavioural model of one solid-state drive behind its SATA
// core, as seen through the stream port of the partition FIFO. Not
// synthesizable logic; testbench use only.
//
// A write command restarts the drive's stream at its first block and
// discards what it held; words are then appended while wr_ready is high.
// A read command streams back, in order, every word written since the last
// write command. READY_PCT sets how often (in percent of cycles) the drive
// accepts or delivers a word, modelling a link slower than the array and
// its varying latency. Counters report the traffic.
module ssd_model
  import dialign_pkg::*;
#(
  parameter int unsigned DEPTH     = 4096,
  parameter int unsigned READY_PCT = 60
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cmd_valid,
  input  logic  cmd_write,
  output logic  cmd_ready,
  input  logic  wr_valid,
  output logic  wr_ready,
  input  link_t wr_data,
  output logic  rd_valid,
  input  logic  rd_ready,
  output link_t rd_data,
  output int    n_writes,
  output int    n_reads,
  output int    n_cmds
);

  typedef enum logic [1:0] {M_IDLE, M_WRITE, M_READ} mode_e;

  link_t mem [DEPTH];
  mode_e mode;
  int    wcount, rptr;
  logic  gate;

  assign cmd_ready = 1'b1;
  assign wr_ready  = (mode == M_WRITE) && gate && (wcount < int'(DEPTH));
  assign rd_valid  = (mode == M_READ) && gate && (rptr < wcount);
  assign rd_data   = mem[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= M_IDLE;
      wcount   <= 0;
      rptr     <= 0;
      gate     <= 1'b0;
      n_writes <= 0;
      n_reads  <= 0;
      n_cmds   <= 0;
    end else begin
      gate <= ($urandom_range(99) < READY_PCT);
      if (cmd_valid) begin
        n_cmds <= n_cmds + 1;
        if (cmd_write) begin
          mode   <= M_WRITE;
          wcount <= 0;
        end else begin
          mode <= M_READ;
          rptr <= 0;
        end
      end else begin
        if (wr_valid && wr_ready) begin
          mem[wcount] <= wr_data;
          wcount      <= wcount + 1;
          n_writes    <= n_writes + 1;
        end
        if (rd_valid && rd_ready) begin
          rptr    <= rptr + 1;
          n_reads <= n_reads + 1;
        end
      end
    end
  end

endmodule
