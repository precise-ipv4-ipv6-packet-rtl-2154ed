// FrameLink-DDR2 transformer: stores a FrameLink stream in the DDR2 memory
// and reads it back as a FrameLink stream.
//
// Each FrameLink beat (64 data bits, rem, sof, eof) becomes one MEM_W-bit
// memory word (pg_pkg::beat_to_word), written at consecutive addresses from
// 0. wr_start clears the write pointer; words_stored is the number of words
// written since, and mem_full stops the write side at the end of memory.
// rd_start replays words 0 .. words_stored-1 once: read commands are issued
// while the read-back FIFO has room for every outstanding read, so the
// controller's read latency is covered and out_ready may stall the stream at
// any time. rd_busy is high until the last word has left.
//
// Memory controller interface (this design's choice; the real controller's
// interface is not described): a command handshake (cmd_valid/cmd_ready,
// cmd_we, cmd_addr, cmd_wdata) and in-order read data (rd_valid, rd_data)
// some clocks later. Write commands have priority over reads.
module fl_ddr2_transformer
  import pg_pkg::*;
#(
  parameter int ADDR_W   = MEM_AW,
  parameter int RD_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst,
  // FrameLink to memory
  input  logic              wr_start,
  input  fl_beat_t          in,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [ADDR_W:0]   words_stored,
  output logic              mem_full,
  // memory to FrameLink
  input  logic              rd_start,
  output fl_beat_t          out,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              rd_busy,
  // DDR2 controller
  output logic              cmd_valid,
  input  logic              cmd_ready,
  output logic              cmd_we,
  output logic [ADDR_W-1:0] cmd_addr,
  output logic [MEM_W-1:0]  cmd_wdata,
  input  logic              rd_valid,
  input  logic [MEM_W-1:0]  rd_data
);

  localparam int CW = $clog2(RD_DEPTH) + 1;

  logic [ADDR_W:0] wptr, raddr;
  logic            rd_active;
  logic [CW-1:0]   outstanding, fifo_cnt;
  logic            fifo_empty, fifo_full;
  logic [MEM_W-1:0] fifo_head;
  logic            wr_cmd, rd_cmd, rd_issue_ok;

  assign mem_full     = wptr[ADDR_W];
  assign words_stored = wptr;

  assign wr_cmd      = in_valid & ~mem_full;
  assign rd_issue_ok = rd_active && (raddr < wptr) &&
                       ((CW+1)'(outstanding) + (CW+1)'(fifo_cnt) < (CW+1)'(RD_DEPTH));
  assign rd_cmd      = ~wr_cmd & rd_issue_ok;

  assign cmd_valid = wr_cmd | rd_cmd;
  assign cmd_we    = wr_cmd;
  assign cmd_addr  = wr_cmd ? wptr[ADDR_W-1:0] : raddr[ADDR_W-1:0];
  assign cmd_wdata = beat_to_word(in);
  assign in_ready  = ~mem_full & cmd_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr        <= '0;
      raddr       <= '0;
      rd_active   <= 1'b0;
      outstanding <= '0;
    end else begin
      if (wr_start)                         wptr <= '0;
      else if (wr_cmd && cmd_ready)         wptr <= wptr + 1'b1;

      if (rd_start) begin
        rd_active <= 1'b1;
        raddr     <= '0;
      end else begin
        if (rd_cmd && cmd_ready) raddr <= raddr + 1'b1;
        if (rd_active && raddr >= wptr && outstanding == 0 && fifo_empty)
          rd_active <= 1'b0;
      end

      outstanding <= outstanding + CW'(rd_cmd && cmd_ready) - CW'(rd_valid);
    end
  end

  sync_fifo #(.WIDTH(MEM_W), .DEPTH(RD_DEPTH)) u_rd_fifo (
    .clk, .rst,
    .push(rd_valid), .wr_data(rd_data), .full(fifo_full),
    .pop(out_valid & out_ready), .rd_data(fifo_head), .empty(fifo_empty),
    .count(fifo_cnt)
  );

  assign out       = word_to_beat(fifo_head);
  assign out_valid = ~fifo_empty;
  assign rd_busy   = rd_active;

  a_rd_room: assert property (@(posedge clk) disable iff (rst) rd_valid |-> !fifo_full);

endmodule
