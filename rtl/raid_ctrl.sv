// raid_ctrl: RAID controller of the storage-backed partition FIFO.
//
// The intermediate data of one partition (one link word per reference row)
// is far larger than on-chip memory and must go to solid-state drives. The
// drives are split into two halves of N_DRIVES/2. During a partition one
// half is written with the stream the partition produces while the other
// half is read back with the stream the previous partition produced; at the
// next partition the halves swap roles. Within a half the stream is striped
// RAID-0 fashion: STRIPE consecutive words go to one drive, the next STRIPE
// words to the next drive, and so on round robin, so the bandwidth of the
// half is the sum of its drives. The read side walks the same pattern, so
// words come back in the order they were written.
//
// Interface and timing:
//   part_start  one-cycle pulse opening a partition. wr_half selects the
//               half to write (the other half is read); wr_active and
//               rd_active say whether this partition writes and reads.
//               It issues one command per involved drive (cmd_write = 1
//               opens a write stream at the drive's start, 0 a read stream
//               of what was last written) and resets the stripe counters.
//   in_*        write stream, valid/ready; routed to drv_wr_valid[d].
//   out_*       read stream, valid/ready; taken from drv_rd_*[d].
//   cmd_busy    high while a command has not yet been taken by its drive.
// Drives are reached through per-drive buffers outside this module. The
// two-half toggling and striping follow the description; the RAID level,
// the stripe size and the command format are this design's choices.
module raid_ctrl #(
  parameter int unsigned N_DRIVES = 2,
  parameter int unsigned W        = 224,
  parameter int unsigned STRIPE   = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                part_start,
  input  logic                wr_half,
  input  logic                wr_active,
  input  logic                rd_active,
  output logic                cmd_busy,
  // write stream from the array
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [W-1:0]        in_data,
  // read stream to the array
  output logic                out_valid,
  input  logic                out_ready,
  output logic [W-1:0]        out_data,
  // drive side (through the drive buffers)
  output logic [N_DRIVES-1:0] drv_cmd_valid,
  output logic [N_DRIVES-1:0] drv_cmd_write,
  input  logic [N_DRIVES-1:0] drv_cmd_ready,
  output logic [N_DRIVES-1:0] drv_wr_valid,
  input  logic [N_DRIVES-1:0] drv_wr_ready,
  output logic [W-1:0]        drv_wr_data,
  input  logic [N_DRIVES-1:0] drv_rd_valid,
  output logic [N_DRIVES-1:0] drv_rd_ready,
  input  logic [W-1:0]        drv_rd_data [N_DRIVES]
);

  localparam int unsigned NH = N_DRIVES / 2;
  localparam int unsigned LW = (NH > 1) ? $clog2(NH) : 1;
  localparam int unsigned DW = (N_DRIVES > 1) ? $clog2(N_DRIVES) : 1;
  localparam int unsigned SW = (STRIPE > 1) ? $clog2(STRIPE) : 1;

  logic          half_q;
  logic [LW-1:0] wr_lane, rd_lane;
  logic [SW-1:0] wr_cnt, rd_cnt;
  logic [DW-1:0] wr_drv, rd_drv;

  assign wr_drv = DW'(half_q) * DW'(NH) + DW'(wr_lane);
  assign rd_drv = DW'(!half_q) * DW'(NH) + DW'(rd_lane);

  // routing
  always_comb begin
    drv_wr_valid         = '0;
    drv_wr_valid[wr_drv] = in_valid;
    in_ready             = drv_wr_ready[wr_drv];
    drv_rd_ready         = '0;
    drv_rd_ready[rd_drv] = out_ready;
    out_valid            = drv_rd_valid[rd_drv];
    out_data             = drv_rd_data[rd_drv];
  end
  assign drv_wr_data = in_data;

  // stripe walk
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_q  <= 1'b0;
      wr_lane <= '0;
      rd_lane <= '0;
      wr_cnt  <= '0;
      rd_cnt  <= '0;
    end else if (part_start) begin
      half_q  <= wr_half;
      wr_lane <= '0;
      rd_lane <= '0;
      wr_cnt  <= '0;
      rd_cnt  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (wr_cnt == SW'(STRIPE - 1)) begin
          wr_cnt  <= '0;
          wr_lane <= (wr_lane == LW'(NH - 1)) ? '0 : wr_lane + 1'b1;
        end else begin
          wr_cnt <= wr_cnt + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (rd_cnt == SW'(STRIPE - 1)) begin
          rd_cnt  <= '0;
          rd_lane <= (rd_lane == LW'(NH - 1)) ? '0 : rd_lane + 1'b1;
        end else begin
          rd_cnt <= rd_cnt + 1'b1;
        end
      end
    end
  end

  // drive commands
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drv_cmd_valid <= '0;
      drv_cmd_write <= '0;
    end else if (part_start) begin
      for (int d = 0; d < int'(N_DRIVES); d++) begin
        if ((d >= int'(NH)) == wr_half) begin
          drv_cmd_valid[d] <= wr_active;
          drv_cmd_write[d] <= 1'b1;
        end else begin
          drv_cmd_valid[d] <= rd_active;
          drv_cmd_write[d] <= 1'b0;
        end
      end
    end else begin
      drv_cmd_valid <= drv_cmd_valid & ~drv_cmd_ready;
    end
  end

  assign cmd_busy = |drv_cmd_valid;

  a_even_drives: assert property (@(posedge clk) N_DRIVES % 2 == 0 && N_DRIVES >= 2);

endmodule
