// Workload testbench: the generator built for a 4 x 1 Gbit/s interface card
// (NUM_IFC = 4), every port generating synthetic IPv4 traffic at the same
// time, rate-limited to 1000 Mbit/s (absolute rate setting).
//
// Each port sends 60 frames whose IP payload length steps through a sequence
// (port p: from 46 + 100*p, step 137, restart after 1480), so the frames have
// many different lengths. The testbench checks on every port:
//   - the frame count, the EtherType, the IPv4 total length against the frame
//     length, and the SENT register;
//   - the average rate: the bits of frames 0..58 over the clocks from the
//     start of frame 0 to the start of frame 59 must be 1000 Mbit/s within
//     0.5 %, with one clock = 6.4 ns (156.25 MHz);
//   - that frames were held back by the rate limiter (a gap between frames).
// The header fields use the single-LFSR random source (RNG_MULTI = 0), the
// smaller option for builds with many ports; the random destination address
// must stay inside its range and vary. It also checks that all four ports
// were sending at the same time. Each of
// these mechanisms is counted and one that never happened is a failure.
// The network side is always ready and no memory is used: the DDR2 ports are
// tied off (always ready, no read data).
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_workload_4x1g;
  import pg_pkg::*;
  localparam int N = 4;
  localparam int NPKT = 60;
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

  precise_packet_generator #(.NUM_IFC(N), .RNG_MULTI(1'b0)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ts_now <= ts_now + 1;
  initial begin
    repeat (200000) @(posedge clk);
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
  task automatic wait_idle(int p);
    logic [31:0] s;
    do begin repeat (50) @(posedge clk); #1; rd(p, REG_STATUS, s); end while (s[0]);
  endtask

  // frame capture per port
  int nbytes [N];
  int nframes [N];
  longint first_sof [N], last_sof [N];
  longint bits_before_last [N];
  int bytes_cur [N];
  byte unsigned hdr [N][34];
  logic [31:0] first_dst [N];
  int dst_changes = 0, dst_out = 0;
  int n_hold = 0, n_concurrent = 0, bad_frames = 0;
  longint prev_eof [N];

  always @(posedge clk) if (!rst) begin
    int active;
    active = 0;
    for (int p = 0; p < N; p++) if (nframes[p] > 0 && nframes[p] < NPKT) active++;
    if (active == N) n_concurrent++;
    for (int p = 0; p < N; p++) begin
      if (net_tx_valid[p] && net_tx_ready[p]) begin
        if (net_tx[p].sof) begin
          if (nframes[p] == 0) first_sof[p] = ts_now;
          else if (ts_now - prev_eof[p] > 1) n_hold++;
          if (nframes[p] == NPKT - 1) begin
            last_sof[p] = ts_now;
            bits_before_last[p] = 8 * longint'(nbytes[p]);
          end
          bytes_cur[p] = 0;
        end
        for (int i = 0; i < 8; i++)
          if (!net_tx[p].eof || i <= net_tx[p].rem) begin
            if (bytes_cur[p] < 34) hdr[p][bytes_cur[p]] = net_tx[p].data[8*i +: 8];
            bytes_cur[p]++;
          end
        if (net_tx[p].eof) begin
          // EtherType 0x0800 and IPv4 total length = frame length - 14
          if (hdr[p][12] != 8'h08 || hdr[p][13] != 8'h00 ||
              hdr[p][14] != 8'h45 ||
              {hdr[p][16], hdr[p][17]} != 16'(bytes_cur[p] - 14) ||
              bytes_cur[p] < 60 || bytes_cur[p] > 1514) bad_frames++;
          // random destination address inside 10.16.0.0/16
          if ({hdr[p][30], hdr[p][31]} != 16'h0A10) dst_out++;
          if (nframes[p] == 0) first_dst[p] = {hdr[p][30], hdr[p][31], hdr[p][32], hdr[p][33]};
          else if ({hdr[p][30], hdr[p][31], hdr[p][32], hdr[p][33]} != first_dst[p]) dst_changes++;
          nbytes[p] += bytes_cur[p];
          nframes[p]++;
          prev_eof[p] = ts_now;
        end
      end
    end
  end

  initial begin
    logic [31:0] sent;
    for (int p = 0; p < N; p++) begin
      mi_addr[p] = 0; mi_dwr[p] = 0; mi_wr[p] = 0; mi_rd[p] = 0;
      dma_tx_valid[p] = 0; dma_rx_ready[p] = 1; net_rx_valid[p] = 0;
      dma_tx[p] = '0; net_rx[p] = '0; net_tx_ready[p] = 1;
      mem_cmd_ready[p] = 1; mem_rd_valid[p] = 0; mem_rd_data[p] = '0;
      nbytes[p] = 0; nframes[p] = 0; bytes_cur[p] = 0; prev_eof[p] = 0;
      first_sof[p] = 0; last_sof[p] = 0; bits_before_last[p] = 0;
    end
    repeat (5) @(posedge clk); rst = 0; repeat (2) @(posedge clk); #1;
    for (int p = 0; p < N; p++) begin
      wr(p, REG_PKTCNT, NPKT);
      wr(p, REG_RATE, 32'd1000);
      wr(p, REG_PATTERN, 32'hC0FF_EE00 + p);
      field(p, F_LEN, FM_SEQ, 128'(46 + 100 * p), 128'd1480, 128'd137);
      field(p, F_ID, FM_SEQ, 128'd0, 128'hFFFF, 128'd1);
      field(p, F_SRC, FM_CONST, 128'(32'h0A00_0001 + p), 0, 0);
      field(p, F_DST, FM_RANDOM, 128'h0A10_0000, 128'h0A10_FFFF, 0);
    end
    for (int p = 0; p < N; p++) wr(p, REG_CONTROL, ctl(1, MODE_GEN, 0, 0, 1, 1));
    for (int p = 0; p < N; p++) wait_idle(p);
    repeat (20) @(posedge clk); #1;
    for (int p = 0; p < N; p++) begin
      real mbps;
      `CHECK(nframes[p] == NPKT, $sformatf("port %0d frame count %0d", p, nframes[p]))
      rd(p, REG_SENT, sent);
      `CHECK(sent == NPKT, $sformatf("port %0d SENT register %0d", p, sent))
      mbps = real'(bits_before_last[p]) / (real'(last_sof[p] - first_sof[p]) * 0.0064);
      $display("port %0d: %0d bytes, %0d clocks, %.2f Mbit/s", p, nbytes[p],
               last_sof[p] - first_sof[p], mbps);
      `CHECK(mbps > 995.0 && mbps < 1005.0, $sformatf("port %0d rate %.2f Mbit/s", p, mbps))
    end
    `CHECK(bad_frames == 0, $sformatf("%0d malformed frames", bad_frames))
    `CHECK(dst_out == 0, $sformatf("%0d destination addresses out of range", dst_out))
    `CHECK(dst_changes > N * (NPKT - 1) / 2, "random destination addresses vary")
    $display("mechanisms: rate_hold=%0d concurrent_clocks=%0d", n_hold, n_concurrent);
    `CHECK(n_hold > 0, "rate limiter held frames back")
    `CHECK(n_concurrent > 0, "all four ports sent at the same time")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
