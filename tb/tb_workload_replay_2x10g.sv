// Workload testbench: replay of stored traffic from DDR2 on both ports of the
// default two-port generator at once, with no limitation, to show that each
// port keeps its 10 Gbit/s link full (one 64-bit beat per clock at
// 156.25 MHz) while reading its own memory.
//
// Each port first loads 120 frames of random length (60..1514 bytes) from
// the host, both ports at the same time; MEMWORDS must then equal the number
// of beats sent. Both ports then replay at once. The memory models accept a
// command every clock and return data after 20 clocks. Checks:
//   - every replayed frame equals the stored one, in order;
//   - per port, from the first replayed beat to the last, the link is busy
//     in at least 99 % of the clocks (beats / clocks);
//   - both ports were replaying in the same clocks.
// Loading, replay, line-rate replay and the two ports' overlap are counted
// as mechanisms and one that never happened is a failure.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_workload_replay_2x10g;
  import pg_pkg::*;
  localparam int N = 2;
  localparam int NFR = 120;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [11:0] mi_addr [N];
  logic [31:0] mi_dwr [N], mi_drd [N];
  logic mi_wr [N], mi_rd [N], mi_ardy [N], mi_drdy [N];
  fl_beat_t dma_tx [N], dma_rx [N], net_rx [N], net_tx [N];
  logic dma_tx_valid [N], dma_tx_ready [N], dma_rx_valid [N], dma_rx_ready [N];
  logic net_rx_valid [N], net_rx_ready [N], net_tx_valid [N], net_tx_ready [N];
  logic mem_cmd_valid [N], mem_cmd_ready [N], mem_cmd_we [N], mem_rd_valid [N];
  logic [MEM_AW-1:0] mem_cmd_addr [N];
  logic [MEM_W-1:0] mem_cmd_wdata [N], mem_rd_data [N];
  logic [63:0] ts_now = 0;
  logic ts_gen_en;

  precise_packet_generator dut (.*);
  for (genvar i = 0; i < N; i++) begin : g_mem
    ddr2_model #(.ADDR_W(MEM_AW), .LATENCY(20), .STALL(1'b0)) ddr (
      .clk, .rst, .cmd_valid(mem_cmd_valid[i]), .cmd_ready(mem_cmd_ready[i]),
      .cmd_we(mem_cmd_we[i]), .cmd_addr(mem_cmd_addr[i]), .cmd_wdata(mem_cmd_wdata[i]),
      .rd_valid(mem_rd_valid[i]), .rd_data(mem_rd_data[i]));
  end
  always #5 clk = ~clk;
  always @(posedge clk) ts_now <= ts_now + 1;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int p, logic [11:0] a, logic [31:0] d);
    mi_addr[p] = a; mi_dwr[p] = d; mi_wr[p] = 1; @(posedge clk); #1; mi_wr[p] = 0;
  endtask
  task automatic rd(int p, logic [11:0] a, output logic [31:0] d);
    mi_addr[p] = a; mi_rd[p] = 1; @(posedge clk); #1; mi_rd[p] = 0; d = mi_drd[p];
  endtask
  task automatic field(int p, int f, field_mode_e m, logic [127:0] from, logic [127:0] to,
                       logic [127:0] inc);
    logic [31:0] modes;
    for (int w = 0; w < 4; w++) begin
      wr(p, REG_FIELD0 + 12'(64 * f + 4 * w),      from[32*w +: 32]);
      wr(p, REG_FIELD0 + 12'(64 * f + 16 + 4 * w), to[32*w +: 32]);
      wr(p, REG_FIELD0 + 12'(64 * f + 32 + 4 * w), inc[32*w +: 32]);
    end
    rd(p, REG_FMODES, modes);
    modes[2*f +: 2] = m;
    wr(p, REG_FMODES, modes);
  endtask
  function automatic logic [31:0] ctl(bit st, pg_mode_e m, bit v6, bit ts, bit re, bit ra);
    return {20'd0, ra, re, ts, v6, 1'b0, 3'(m), 3'd0, st};
  endfunction
  task automatic start_mode(int p, logic [31:0] c);
    logic [31:0] s;
    wr(p, REG_CONTROL, c);
    do rd(p, REG_STATUS, s); while (!s[0]);
  endtask
  task automatic wait_idle(int p);
    logic [31:0] s;
    do begin repeat (20) @(posedge clk); #1; rd(p, REG_STATUS, s); end while (s[0]);
  endtask

  typedef byte unsigned bq_t [$];
  bq_t cur [N];
  bq_t got [N][$];
  longint first_beat [N], last_beat [N];
  int beats_out [N];
  bit replaying = 0;
  int n_overlap = 0;
  always @(posedge clk) if (!rst) begin
    if (replaying && net_tx_valid[0] && net_tx_valid[1]) n_overlap++;
    for (int p = 0; p < N; p++)
      if (replaying && net_tx_valid[p] && net_tx_ready[p]) begin
        if (beats_out[p] == 0) first_beat[p] = ts_now;
        last_beat[p] = ts_now;
        beats_out[p]++;
        if (net_tx[p].sof) cur[p] = {};
        for (int i = 0; i < 8; i++)
          if (!net_tx[p].eof || i <= net_tx[p].rem) cur[p].push_back(net_tx[p].data[8*i +: 8]);
        if (net_tx[p].eof) got[p].push_back(cur[p]);
      end
  end

  task automatic send_dma(int p, fl_beat_t b);
    bit ok;
    dma_tx[p] = b; dma_tx_valid[p] = 1;
    do begin @(posedge clk); ok = dma_tx_ready[p]; #1; end while (!ok);
    dma_tx_valid[p] = 0;
  endtask
  task automatic send_frame(int p, bq_t bytes, bit with_ts, longint ts);
    int beats;
    fl_beat_t b;
    beats = (bytes.size() + 7) / 8;
    if (with_ts) send_dma(p, '{data: ts, rem: 3'd7, sof: 1'b1, eof: 1'b0});
    for (int i = 0; i < beats; i++) begin
      b.data = '0;
      for (int k = 0; k < 8; k++) if (8 * i + k < bytes.size()) b.data[8*k +: 8] = bytes[8*i + k];
      b.sof = (i == 0) && !with_ts;
      b.eof = (i == beats - 1);
      b.rem = 3'(b.eof ? bytes.size() - 1 - 8 * i : 7);
      send_dma(p, b);
    end
  endtask
  function automatic bq_t rand_frame(int n, int tag);
    bq_t q;
    for (int i = 0; i < n; i++) q.push_back(8'(i == 0 ? tag : $urandom));
    return q;
  endfunction

  bq_t stored [N][$];
  int beats_in [N];
  int n_load = 0, n_replay = 0, n_line = 0;

  task automatic load_port(int p);
    for (int f = 0; f < NFR; f++) begin
      bq_t q;
      q = rand_frame(60 + $urandom % 1455, 16 * p + f);
      stored[p].push_back(q);
      beats_in[p] += (q.size() + 7) / 8;
      send_frame(p, q, 0, 0);
    end
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin
      mi_addr[p] = 0; mi_dwr[p] = 0; mi_wr[p] = 0; mi_rd[p] = 0;
      dma_tx_valid[p] = 0; dma_rx_ready[p] = 1; net_rx_valid[p] = 0; net_tx_ready[p] = 1;
      dma_tx[p] = '0; net_rx[p] = '0; beats_in[p] = 0; beats_out[p] = 0;
      first_beat[p] = 0; last_beat[p] = 0;
    end
    repeat (5) @(posedge clk); rst = 0; repeat (2) @(posedge clk); #1;
    // load both memories at the same time
    for (int p = 0; p < N; p++) start_mode(p, ctl(1, MODE_LOAD_HOST, 0, 0, 0, 0));
    fork
      load_port(0);
      load_port(1);
    join
    for (int p = 0; p < N; p++) begin
      logic [31:0] words;
      wr(p, REG_CONTROL, 32'h2 | ctl(0, MODE_LOAD_HOST, 0, 0, 0, 0));
      wait_idle(p);
      rd(p, REG_MEMWORDS, words);
      `CHECK(words == beats_in[p], $sformatf("port %0d stored %0d words, sent %0d beats",
                                             p, words, beats_in[p]))
      if (words == beats_in[p]) n_load++;
    end
    // replay both at once, no limitation
    replaying = 1;
    for (int p = 0; p < N; p++) wr(p, REG_CONTROL, ctl(1, MODE_REPLAY, 0, 0, 0, 0));
    for (int p = 0; p < N; p++) wait_idle(p);
    replaying = 0;
    for (int p = 0; p < N; p++) begin
      real busy;
      `CHECK(got[p].size() == NFR, $sformatf("port %0d replayed %0d frames", p, got[p].size()))
      foreach (got[p][i]) begin
        `CHECK(got[p][i] == stored[p][i], $sformatf("port %0d frame %0d content", p, i))
        n_replay++;
      end
      `CHECK(beats_out[p] == beats_in[p], "replayed beat count")
      busy = real'(beats_out[p]) / real'(last_beat[p] - first_beat[p] + 1);
      $display("port %0d: %0d beats in %0d clocks, link busy %.4f", p, beats_out[p],
               last_beat[p] - first_beat[p] + 1, busy);
      `CHECK(busy >= 0.99, $sformatf("port %0d replay at line rate (%.4f)", p, busy))
      if (busy >= 0.99) n_line++;
    end
    $display("mechanisms: load=%0d replay=%0d line_rate=%0d overlap_clocks=%0d",
             n_load, n_replay, n_line, n_overlap);
    `CHECK(n_load > 0, "loading happened")
    `CHECK(n_replay > 0, "replay happened")
    `CHECK(n_line > 0, "replay at line rate happened")
    `CHECK(n_overlap > 0, "both ports replayed at the same time")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
