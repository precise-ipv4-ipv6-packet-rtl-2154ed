// End-to-end testbench of the one-interface generator (pg_core, default
// parameters) with the DDR2 controller model. Everything is set up through
// the MI32 register bus, as software would:
//   1. NIC mode: host frames reach the network, received frames the host;
//   2. IPv4 generation: constant length, identification as a sequence,
//      random source address in a range, 8 packets; checks content and
//      checksum, the sent counter and the return to NIC mode;
//   3. IPv6 generation at half the line rate: checks frame spacing;
//   4. loading host traffic with timestamps into memory, then replay with
//      timestamp limitation: each packet must leave at its timestamp;
//   5. loading traffic from the network, replay without limitation while the
//      network stalls the output.
// Each mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_pg_core;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [11:0] mi_addr = 0;
  logic [31:0] mi_dwr = 0, mi_drd;
  logic mi_wr = 0, mi_rd = 0, mi_ardy, mi_drdy;
  fl_beat_t dma_tx, dma_rx, net_rx, net_tx;
  logic dma_tx_valid = 0, dma_tx_ready, dma_rx_valid, dma_rx_ready = 1;
  logic net_rx_valid = 0, net_rx_ready, net_tx_valid, net_tx_ready = 1;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_we, mem_rd_valid;
  logic [MEM_AW-1:0] mem_cmd_addr;
  logic [MEM_W-1:0] mem_cmd_wdata, mem_rd_data;
  logic [63:0] ts_now = 0;
  logic ts_gen_en;

  pg_core dut (.*);
  ddr2_model #(.ADDR_W(MEM_AW), .LATENCY(14)) ddr (
    .clk, .rst, .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_we(mem_cmd_we),
    .cmd_addr(mem_cmd_addr), .cmd_wdata(mem_cmd_wdata), .rd_valid(mem_rd_valid),
    .rd_data(mem_rd_data));
  always #5 clk = ~clk;
  always @(posedge clk) ts_now <= ts_now + 1;   // timestamp unit: one tick per clock
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  // ------------------------------------------------------------ bus
  task automatic wr(logic [11:0] a, logic [31:0] d);
    mi_addr = a; mi_dwr = d; mi_wr = 1; @(posedge clk); #1; mi_wr = 0;
  endtask
  task automatic rd(logic [11:0] a, output logic [31:0] d);
    mi_addr = a; mi_rd = 1; @(posedge clk); #1; mi_rd = 0; d = mi_drd;
  endtask
  task automatic field(int f, field_mode_e m, logic [127:0] from, logic [127:0] to,
                       logic [127:0] inc);
    logic [31:0] modes;
    for (int w = 0; w < 4; w++) begin
      wr(REG_FIELD0 + 12'(64 * f + 4 * w),      from[32*w +: 32]);
      wr(REG_FIELD0 + 12'(64 * f + 16 + 4 * w), to[32*w +: 32]);
      wr(REG_FIELD0 + 12'(64 * f + 32 + 4 * w), inc[32*w +: 32]);
    end
    rd(REG_FMODES, modes);
    modes[2*f +: 2] = m;
    wr(REG_FMODES, modes);
  endtask
  // control word: start, mode, ipv6, ts_present, rate_en, rate_abs, payload_random
  function automatic logic [31:0] ctl(bit st, pg_mode_e m, bit v6, bit ts, bit re, bit ra, bit pr);
    return {19'd0, pr, ra, re, ts, v6, 1'b0, 3'(m), 3'd0, st};
  endfunction
  // starts a mode and waits until the generator reports it busy, as software
  // must before it sends traffic for the new mode
  task automatic start_mode(logic [31:0] c);
    logic [31:0] s;
    wr(REG_CONTROL, c);
    do rd(REG_STATUS, s); while (!s[0]);
  endtask
  task automatic wait_idle();
    logic [31:0] s;
    do begin repeat (20) @(posedge clk); #1; rd(REG_STATUS, s); end while (s[0]);
  endtask

  // ------------------------------------------------------------ streams
  typedef byte unsigned bq_t [$];
  bq_t cur, net_frames [$];
  longint net_sof_t [$];
  fl_beat_t host_q [$];
  int stall_cycles = 0;
  bit random_net_ready = 0;
  always @(posedge clk) begin
    #1; net_tx_ready = random_net_ready ? ($urandom % 3 != 0) : 1'b1;
  end
  always @(posedge clk) if (!rst) begin
    if (net_tx_valid && !net_tx_ready) stall_cycles++;
    if (net_tx_valid && net_tx_ready) begin
      if (net_tx.sof) begin cur = {}; net_sof_t.push_back(ts_now); end
      for (int i = 0; i < 8; i++) if (!net_tx.eof || i <= net_tx.rem) cur.push_back(net_tx.data[8*i +: 8]);
      if (net_tx.eof) net_frames.push_back(cur);
    end
    if (dma_rx_valid && dma_rx_ready) begin
      `CHECK(host_q.size() > 0 && dma_rx == host_q[0], "frame to host")
      void'(host_q.pop_front());
    end
  end

  task automatic send(bit to_net, fl_beat_t b);
    bit ok;
    if (to_net) begin
      net_rx = b; net_rx_valid = 1;
      do begin @(posedge clk); ok = net_rx_ready; #1; end while (!ok);
      net_rx_valid = 0;
    end else begin
      dma_tx = b; dma_tx_valid = 1;
      do begin @(posedge clk); ok = dma_tx_ready; #1; end while (!ok);
      dma_tx_valid = 0;
    end
  endtask
  // sends a frame of the given bytes, optionally preceded by a timestamp beat
  task automatic send_frame(bit from_net, bq_t bytes, bit with_ts, longint ts);
    int beats;
    fl_beat_t b;
    beats = (bytes.size() + 7) / 8;
    if (with_ts) send(from_net, '{data: ts, rem: 3'd7, sof: 1'b1, eof: 1'b0});
    for (int i = 0; i < beats; i++) begin
      b.data = '0;
      for (int k = 0; k < 8; k++) if (8 * i + k < bytes.size()) b.data[8*k +: 8] = bytes[8*i + k];
      b.sof = (i == 0) && !with_ts;
      b.eof = (i == beats - 1);
      b.rem = 3'(b.eof ? bytes.size() - 1 - 8 * i : 7);
      send(from_net, b);
    end
  endtask
  function automatic bq_t rand_frame(int n, int tag);
    bq_t q;
    for (int i = 0; i < n; i++) q.push_back(8'(i == 0 ? tag : $urandom));
    return q;
  endfunction

  // ------------------------------------------------------------ test
  int n_nic = 0, n_gen4 = 0, n_gen6 = 0, n_rate = 0, n_ts_hold = 0, n_load_host = 0,
      n_load_net = 0, n_replay = 0, n_stall = 0;
  bq_t sent_q [$];
  longint due [$];
  logic [31:0] r;

  initial begin
    repeat (5) @(posedge clk); rst = 0; repeat (2) @(posedge clk); #1;

    // 1. NIC mode
    sent_q = {};
    for (int f = 0; f < 6; f++) begin
      bq_t q;
      q = rand_frame(60 + 37 * f, f);
      sent_q.push_back(q);
      send_frame(0, q, 0, 0);
    end
    for (int f = 0; f < 4; f++) begin
      bq_t q;
      q = rand_frame(64 + 8 * f, 100 + f);
      for (int i = 0; i < (q.size() + 7) / 8; i++) begin
        fl_beat_t b;
        b.data = '0;
        for (int k = 0; k < 8; k++) if (8 * i + k < q.size()) b.data[8*k +: 8] = q[8*i + k];
        b.sof = (i == 0); b.eof = (i == (q.size() + 7) / 8 - 1);
        b.rem = 3'(b.eof ? q.size() - 1 - 8 * i : 7);
        host_q.push_back(b);
      end
      send_frame(1, q, 0, 0);
    end
    repeat (50) @(posedge clk); #1;
    `CHECK(net_frames.size() == 6 && host_q.size() == 0, "NIC traffic both ways")
    foreach (net_frames[i]) `CHECK(net_frames[i] == sent_q[i], "NIC frame unchanged")
    n_nic = net_frames.size();
    net_frames = {};

    // 2. IPv4 generation, 8 packets
    wr(REG_DMAC_LO, 32'h3344_5566); wr(REG_DMAC_HI, 32'h1122);
    wr(REG_SMAC_LO, 32'h0A0B_0C0D); wr(REG_SMAC_HI, 32'h0809);
    wr(REG_PATTERN, 32'hDEAD_BEEF); wr(REG_PKTCNT, 32'd8);
    field(F_LEN, FM_CONST, 128'd100, 0, 0);
    field(F_ID, FM_SEQ, 128'd5, 128'd20, 128'd4);
    field(F_TTL, FM_CONST, 128'd64, 0, 0);
    field(F_PROTO, FM_CONST, 128'd17, 0, 0);
    field(F_SRC, FM_RANDOM, 128'hC0A8_0000, 128'hC0A8_00FF, 0);
    field(F_DST, FM_SEQ, 128'h0A00_0001, 128'h0A00_0003, 128'd1);
    wr(REG_CONTROL, ctl(1, MODE_GEN, 0, 0, 0, 0, 0));
    wait_idle();
    `CHECK(net_frames.size() == 8, $sformatf("8 IPv4 frames (%0d)", net_frames.size()))
    foreach (net_frames[n]) begin
      bq_t q;
      int sum, id;
      q = net_frames[n];
      `CHECK(q.size() == 134, "IPv4 frame length")
      if (q.size() != 134) continue;
      `CHECK(q[0] == 8'h11 && q[1] == 8'h22 && q[2] == 8'h33 && q[5] == 8'h66 &&
             q[6] == 8'h08 && q[11] == 8'h0D, "MAC addresses")
      `CHECK(q[12] == 8'h08 && q[13] == 8'h00 && q[14] == 8'h45, "EtherType and version")
      `CHECK({q[16], q[17]} == 16'd120, "total length")
      id = 5 + 4 * n; while (id > 20) id -= 16;
      `CHECK({q[18], q[19]} == 16'(id), $sformatf("identification %0d", {q[18], q[19]}))
      `CHECK(q[22] == 64 && q[23] == 17, "TTL and protocol")
      `CHECK(q[26] == 8'hC0 && q[27] == 8'hA8 && q[28] == 8'h00, "random source in range")
      `CHECK({q[30], q[31], q[32], q[33]} == 32'h0A00_0001 + 32'(n % 3), "destination sequence")
      sum = 0;
      for (int i = 14; i < 34; i += 2) sum += {q[i], q[i+1]};
      while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
      `CHECK(sum == 16'hFFFF, "IPv4 checksum")
      `CHECK(q[34] == 8'hDE && q[35] == 8'hAD && q[36] == 8'hBE && q[37] == 8'hEF, "payload pattern")
      n_gen4++;
    end
    rd(REG_SENT, r);
    `CHECK(r == 8, "sent counter")
    net_frames = {}; net_sof_t = {};

    // 3. IPv6 generation at half the line rate
    field(F_LEN, FM_CONST, 128'd200, 0, 0);
    field(F_SRC, FM_CONST, 128'h2001_0DB8_0000_0000_0000_0000_0000_0001, 0, 0);
    field(F_FLOW, FM_SEQ, 128'd1, 128'hFFFFF, 128'd1);
    wr(REG_PKTCNT, 32'd12); wr(REG_RATE, 32'd32768);
    wr(REG_CONTROL, ctl(1, MODE_GEN, 1, 0, 1, 0, 1));
    wait_idle();
    `CHECK(net_frames.size() == 12, "12 IPv6 frames")
    foreach (net_frames[n]) begin
      `CHECK(net_frames[n].size() == 254 && net_frames[n][12] == 8'h86 && net_frames[n][13] == 8'hDD &&
             net_frames[n][14][7:4] == 4'h6 && {net_frames[n][18], net_frames[n][19]} == 16'd200 &&
             net_frames[n][22] == 8'h20 && net_frames[n][37] == 8'h01, "IPv6 header")
      `CHECK({net_frames[n][15][3:0], net_frames[n][16], net_frames[n][17]} == 20'(n + 1), "flow label sequence")
      n_gen6++;
    end
    // 254 bytes = 2032 bits at 32 bits per clock: 63.5 clocks per packet
    `CHECK(net_sof_t[11] - net_sof_t[0] >= 11 * 63 && net_sof_t[11] - net_sof_t[0] <= 11 * 64 + 2,
           $sformatf("rate-limited spacing %0d", net_sof_t[11] - net_sof_t[0]))
    for (int i = 1; i < 12; i++) if (net_sof_t[i] - net_sof_t[i-1] > 33) n_rate++;
    net_frames = {}; net_sof_t = {};

    // 4. host traffic with timestamps into memory, replay at the timestamps
    start_mode(ctl(1, MODE_LOAD_HOST, 0, 1, 0, 0, 0));
    sent_q = {}; due = {};
    begin
      longint t;
      t = 0;
      for (int f = 0; f < 15; f++) begin
        bq_t q;
        q = rand_frame(60 + $urandom % 300, f);
        t += (f % 4 == 0) ? 500 : 30 + $urandom % 100;
        sent_q.push_back(q); due.push_back(t);
        send_frame(0, q, 1, t);
      end
    end
    repeat (30) @(posedge clk); #1;
    wr(REG_CONTROL, 32'h2 | ctl(0, MODE_LOAD_HOST, 0, 1, 0, 0, 0));
    wait_idle();
    rd(REG_MEMWORDS, r);
    `CHECK(r > 15 && r < 15 * 50, $sformatf("words stored %0d", r))
    n_load_host = (r > 15);
    // timestamps were shifted forward in software: add the current time
    begin
      longint base;
      base = ts_now + 2000;
      sent_q = {}; due = {};
      start_mode(ctl(1, MODE_LOAD_HOST, 0, 1, 0, 0, 0));
      for (int f = 0; f < 15; f++) begin
        bq_t q;
        q = rand_frame(60 + $urandom % 300, 40 + f);
        sent_q.push_back(q); due.push_back(base + 40 * f + 600 * (f / 5));
        send_frame(0, q, 1, due[f]);
      end
      wr(REG_CONTROL, 32'h2 | ctl(0, MODE_LOAD_HOST, 0, 1, 0, 0, 0));
      wait_idle();
      net_frames = {}; net_sof_t = {};
      wr(REG_CONTROL, ctl(1, MODE_REPLAY, 0, 1, 0, 0, 0));
      wait_idle();
    end
    `CHECK(net_frames.size() == 15, $sformatf("15 replayed frames (%0d)", net_frames.size()))
    foreach (net_frames[i]) begin
      `CHECK(net_frames[i] == sent_q[i], $sformatf("replayed frame %0d content: %0d bytes, tag %0d, expected %0d bytes", i, net_frames[i].size(), net_frames[i][0], sent_q[i].size()))
      `CHECK(net_sof_t[i] >= due[i] && net_sof_t[i] <= due[i] + 4,
             $sformatf("frame %0d left at %0d, timestamp %0d", i, net_sof_t[i], due[i]))
      if (i > 0 && net_sof_t[i] - net_sof_t[i-1] > 40) n_ts_hold++;
      n_replay++;
    end

    // 5. network traffic into memory, replay with output stalls
    start_mode(ctl(1, MODE_LOAD_NET, 0, 0, 0, 0, 0));
    sent_q = {};
    for (int f = 0; f < 10; f++) begin
      bq_t q;
      q = rand_frame(64 + $urandom % 500, 80 + f);
      sent_q.push_back(q);
      send_frame(1, q, 0, 0);
    end
    wr(REG_CONTROL, 32'h2 | ctl(0, MODE_LOAD_NET, 0, 0, 0, 0, 0));
    wait_idle();
    n_load_net = 10;
    net_frames = {};
    random_net_ready = 1;
    stall_cycles = 0;
    wr(REG_CONTROL, ctl(1, MODE_REPLAY, 0, 0, 0, 0, 0));
    wait_idle();
    random_net_ready = 0;
    `CHECK(net_frames.size() == 10, "network traffic replayed")
    foreach (net_frames[i]) `CHECK(net_frames[i] == sent_q[i], "network frame replayed unchanged")
    n_stall = stall_cycles;

    $display("mechanisms: nic=%0d gen_ipv4=%0d gen_ipv6=%0d rate_hold=%0d load_host=%0d ts_hold=%0d replay=%0d load_net=%0d stalls=%0d",
             n_nic, n_gen4, n_gen6, n_rate, n_load_host, n_ts_hold, n_replay, n_load_net, n_stall);
    `CHECK(n_nic > 0,       "NIC pass-through happened")
    `CHECK(n_gen4 > 0,      "IPv4 generation happened")
    `CHECK(n_gen6 > 0,      "IPv6 generation happened")
    `CHECK(n_rate > 0,      "rate limitation held packets")
    `CHECK(n_load_host > 0, "host load happened")
    `CHECK(n_ts_hold > 0,   "timestamp limitation held packets")
    `CHECK(n_replay > 0,    "replay happened")
    `CHECK(n_load_net > 0,  "network load happened")
    `CHECK(n_stall > 0,     "network back-pressure happened")
    `TB_FINISH
  end
endmodule
