// End-to-end testbench of the two-interface generator at its default
// parameters, with one DDR2 controller model per interface. The two
// interfaces run at the same time and independently:
//   interface 0: NIC pass-through, then IPv4 generation of 20 packets with
//                random lengths at an absolute rate of 2000 Mbit/s;
//   interface 1: IPv6 generation of 10 packets at full speed, then loading
//                host traffic with timestamps and replaying it at the
//                timestamps while the network stalls now and then.
// Every mechanism used is counted, and one that never happened is a failure.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_precise_packet_generator;
  import pg_pkg::*;
  localparam int N = 2;
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
    ddr2_model #(.ADDR_W(MEM_AW), .LATENCY(12 + 4 * i)) ddr (
      .clk, .rst, .cmd_valid(mem_cmd_valid[i]), .cmd_ready(mem_cmd_ready[i]),
      .cmd_we(mem_cmd_we[i]), .cmd_addr(mem_cmd_addr[i]), .cmd_wdata(mem_cmd_wdata[i]),
      .rd_valid(mem_rd_valid[i]), .rd_data(mem_rd_data[i]));
  end
  always #5 clk = ~clk;
  always @(posedge clk) ts_now <= ts_now + 1;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
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
  bq_t frames0 [$], frames1 [$];
  longint sof0 [$], sof1 [$];
  bit random_ready [N] = '{0, 0};
  int stalls = 0;
  always @(posedge clk) begin
    #1;
    for (int p = 0; p < N; p++) net_tx_ready[p] = random_ready[p] ? ($urandom % 4 != 0) : 1'b1;
  end
  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < N; p++) begin
      if (net_tx_valid[p] && !net_tx_ready[p]) stalls++;
      if (net_tx_valid[p] && net_tx_ready[p]) begin
        if (net_tx[p].sof) begin
          cur[p] = {};
          if (p == 0) sof0.push_back(ts_now); else sof1.push_back(ts_now);
        end
        for (int i = 0; i < 8; i++)
          if (!net_tx[p].eof || i <= net_tx[p].rem) cur[p].push_back(net_tx[p].data[8*i +: 8]);
        if (net_tx[p].eof) begin
          if (p == 0) frames0.push_back(cur[p]); else frames1.push_back(cur[p]);
        end
      end
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

  int n_nic = 0, n_gen4 = 0, n_gen6 = 0, n_rate = 0, n_ts_hold = 0, n_replay = 0;
  bq_t nic_q [$], rep_q [$];
  longint due [$];
  longint bits0;

  initial begin
    for (int p = 0; p < N; p++) begin
      mi_addr[p] = 0; mi_dwr[p] = 0; mi_wr[p] = 0; mi_rd[p] = 0;
      dma_tx_valid[p] = 0; dma_rx_ready[p] = 1; net_rx_valid[p] = 0; dma_tx[p] = '0; net_rx[p] = '0;
    end
    repeat (5) @(posedge clk); rst = 0; repeat (2) @(posedge clk); #1;
    fork
      // ---------------------------------------------------- interface 0
      begin
        for (int f = 0; f < 5; f++) begin
          bq_t q;
          q = rand_frame(60 + 50 * f, f);
          nic_q.push_back(q);
          send_frame(0, q, 0, 0);
        end
        repeat (50) @(posedge clk); #1;
        `CHECK(frames0.size() == 5, "NIC frames on interface 0")
        foreach (frames0[i]) if (i < nic_q.size()) `CHECK(frames0[i] == nic_q[i], "NIC frame content")
        n_nic = frames0.size();
        frames0 = {}; sof0 = {};
        wr(0, REG_PKTCNT, 32'd20); wr(0, REG_RATE, 32'd2000);
        field(0, F_LEN, FM_RANDOM, 128'd46, 128'd1000, 0);
        field(0, F_ID, FM_SEQ, 128'd0, 128'hFFFF, 128'd1);
        field(0, F_TTL, FM_CONST, 128'd32, 0, 0);
        field(0, F_SRC, FM_CONST, 128'h0A01_0203, 0, 0);
        field(0, F_DST, FM_RANDOM, 128'h0A02_0000, 128'h0A02_FFFF, 0);
        wr(0, REG_CONTROL, ctl(1, MODE_GEN, 0, 0, 1, 1));
        wait_idle(0);
        `CHECK(frames0.size() == 20, $sformatf("20 IPv4 frames (%0d)", frames0.size()))
        bits0 = 0;
        foreach (frames0[n]) begin
          int sum, plen;
          bq_t q;
          q = frames0[n];
          plen = {q[16], q[17]} - 20;
          `CHECK(q.size() == 34 + plen && plen >= 46 && plen <= 1000, "IPv4 random length")
          `CHECK({q[18], q[19]} == 16'(n), "identification sequence")
          `CHECK(q[30] == 8'h0A && q[31] == 8'h02, "random destination in range")
          sum = 0;
          for (int i = 14; i < 34; i += 2) sum += {q[i], q[i+1]};
          while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
          `CHECK(sum == 16'hFFFF, "IPv4 checksum")
          if (n < 19) bits0 += 8 * q.size();
          if (n > 0 && sof0[n] - sof0[n-1] > (q.size() + 7) / 8 + 2) n_rate++;
          n_gen4++;
        end
        // 2000 Mbit/s at 156.25 MHz is 12.8 bits per clock
        `CHECK(sof0[19] - sof0[0] >= longint'(bits0 / 12.8) - 3 &&
               sof0[19] - sof0[0] <= longint'(bits0 / 12.8) + 3,
               $sformatf("2000 Mbit/s: %0d clocks for %0d bits", sof0[19] - sof0[0], bits0))
      end
      // ---------------------------------------------------- interface 1
      begin
        longint base;
        wr(1, REG_PKTCNT, 32'd10);
        field(1, F_LEN, FM_SEQ, 128'd100, 128'd1000, 128'd100);
        field(1, F_SRC, FM_SEQ, 128'h2001_0DB8_0000_0000_0000_0000_0000_0001,
                                128'h2001_0DB8_0000_0000_0000_0000_0000_00FF, 128'd1);
        field(1, F_TTL, FM_CONST, 128'd255, 0, 0);
        wr(1, REG_CONTROL, ctl(1, MODE_GEN, 1, 0, 0, 0));
        wait_idle(1);
        `CHECK(frames1.size() == 10, "10 IPv6 frames")
        foreach (frames1[n]) begin
          `CHECK(frames1[n].size() == 54 + 100 * (n + 1) && frames1[n][12] == 8'h86 &&
                 frames1[n][21] == 8'd255 && frames1[n][37] == 8'(n + 1), "IPv6 frame")
          n_gen6++;
        end
        `CHECK(sof1[9] - sof1[0] <= 5000, "full-speed generation without gaps")
        frames1 = {}; sof1 = {};
        // load with timestamps, then replay
        start_mode(1, ctl(1, MODE_LOAD_HOST, 0, 1, 0, 0));
        base = ts_now + 3000;
        for (int f = 0; f < 12; f++) begin
          bq_t q;
          q = rand_frame(60 + $urandom % 600, 50 + f);
          rep_q.push_back(q);
          due.push_back(base + 200 * f + ((f > 6) ? 2000 : 0));
          send_frame(1, q, 1, due[f]);
        end
        wr(1, REG_CONTROL, 32'h2 | ctl(0, MODE_LOAD_HOST, 0, 1, 0, 0));
        wait_idle(1);
        random_ready[1] = 1;
        wr(1, REG_CONTROL, ctl(1, MODE_REPLAY, 0, 1, 0, 0));
        wait_idle(1);
        random_ready[1] = 0;
        `CHECK(frames1.size() == 12, "12 frames replayed")
        foreach (frames1[i]) begin
          `CHECK(frames1[i] == rep_q[i], "replayed content")
          `CHECK(sof1[i] >= due[i] && sof1[i] <= due[i] + 6,
                 $sformatf("frame %0d left at %0d, timestamp %0d", i, sof1[i], due[i]))
          if (i > 0 && sof1[i] - sof1[i-1] > 100) n_ts_hold++;
          n_replay++;
        end
      end
    join
    $display("mechanisms: nic=%0d gen_ipv4=%0d rate_hold=%0d gen_ipv6=%0d replay=%0d ts_hold=%0d stalls=%0d",
             n_nic, n_gen4, n_rate, n_gen6, n_replay, n_ts_hold, stalls);
    `CHECK(n_nic > 0,     "NIC pass-through happened")
    `CHECK(n_gen4 > 0,    "IPv4 generation happened")
    `CHECK(n_rate > 0,    "rate limitation held packets")
    `CHECK(n_gen6 > 0,    "IPv6 generation happened")
    `CHECK(n_replay > 0,  "replay happened")
    `CHECK(n_ts_hold > 0, "timestamp limitation held packets")
    `CHECK(stalls > 0,    "network back-pressure happened")
    `TB_FINISH
  end
endmodule
