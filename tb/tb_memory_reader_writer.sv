// Testbench of memory_reader_writer with the DDR2 controller model: frames
// from the host are stored (MODE_LOAD_HOST) and replayed to the limiter side
// (MODE_REPLAY); frames from the network are stored (MODE_LOAD_NET) and
// replayed; in MODE_NIC host frames reach the limiter side directly and
// received frames reach the host.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_memory_reader_writer;
  import pg_pkg::*;
  localparam int AW = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, wr_start = 0, rd_start = 0, mem_full, rd_busy;
  pg_mode_e mode = MODE_NIC;
  logic [AW:0] words_stored;
  fl_beat_t dma_tx, dma_rx, net_rx, lim;
  logic dma_tx_valid = 0, dma_tx_ready, dma_rx_valid, dma_rx_ready = 1;
  logic net_rx_valid = 0, net_rx_ready, lim_valid, lim_ready = 1;
  logic cmd_valid, cmd_ready, cmd_we, rd_valid;
  logic [AW-1:0] cmd_addr;
  logic [MEM_W-1:0] cmd_wdata, rd_data;

  memory_reader_writer #(.ADDR_W(AW), .RD_DEPTH(16)) dut (.*);
  ddr2_model #(.ADDR_W(AW), .LATENCY(10)) mem (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd_we, .cmd_addr, .cmd_wdata, .rd_valid, .rd_data);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  always @(posedge clk) begin #1; lim_ready = ($urandom % 4 != 0); end

  fl_beat_t lim_q [$], host_q [$];
  always @(posedge clk) if (!rst) begin
    if (lim_valid && lim_ready) begin
      `CHECK(lim_q.size() > 0 && lim == lim_q[0], "beat towards limiter")
      void'(lim_q.pop_front());
    end
    if (dma_rx_valid && dma_rx_ready) begin
      `CHECK(host_q.size() > 0 && dma_rx == host_q[0], "beat towards host")
      void'(host_q.pop_front());
    end
  end

  task automatic send_dma(fl_beat_t b);
    bit ok;
    dma_tx = b; dma_tx_valid = 1;
    do begin @(posedge clk); ok = dma_tx_ready; #1; end while (!ok);
    dma_tx_valid = 0;
  endtask
  task automatic send_net(fl_beat_t b);
    bit ok;
    net_rx = b; net_rx_valid = 1;
    do begin @(posedge clk); ok = net_rx_ready; #1; end while (!ok);
    net_rx_valid = 0;
  endtask
  task automatic frames(int n, int tag, bit from_net, ref fl_beat_t q [$]);
    for (int f = 0; f < n; f++) begin
      int beats;
      beats = 1 + $urandom % 9;
      for (int i = 0; i < beats; i++) begin
        fl_beat_t b;
        b = '{data: {16'(tag), 16'(f), 32'(i)}, rem: 3'($urandom), sof: (i == 0),
              eof: (i == beats - 1)};
        q.push_back(b);
        if (from_net) send_net(b); else send_dma(b);
      end
    end
  endtask
  task automatic pulse(ref logic s); s = 1; @(posedge clk); #1; s = 0; endtask

  fl_beat_t stored [$];
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk); #1;
    // NIC mode both ways
    mode = MODE_NIC;
    frames(10, 1, 0, lim_q);
    frames(10, 2, 1, host_q);
    repeat (20) @(posedge clk); #1;
    `CHECK(lim_q.size() == 0 && host_q.size() == 0, "NIC traffic delivered")
    // load from host, replay
    mode = MODE_LOAD_HOST; pulse(wr_start);
    stored = {};
    frames(20, 3, 0, stored);
    repeat (20) @(posedge clk); #1;
    `CHECK(words_stored == (AW+1)'(stored.size()), "host load word count")
    mode = MODE_REPLAY; lim_q = stored; pulse(rd_start);
    wait (!rd_busy); repeat (5) @(posedge clk); #1;
    `CHECK(lim_q.size() == 0, "host traffic replayed")
    // load from network, replay
    mode = MODE_LOAD_NET; pulse(wr_start);
    stored = {};
    frames(20, 4, 1, stored);
    repeat (20) @(posedge clk); #1;
    `CHECK(words_stored == (AW+1)'(stored.size()), "network load word count")
    `CHECK(host_q.size() == 0, "nothing to host while loading from network")
    mode = MODE_REPLAY; lim_q = stored; pulse(rd_start);
    wait (!rd_busy); repeat (5) @(posedge clk); #1;
    `CHECK(lim_q.size() == 0, "network traffic replayed")
    `TB_FINISH
  end
endmodule
