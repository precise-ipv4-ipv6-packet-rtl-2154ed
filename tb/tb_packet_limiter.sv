// Testbench of packet_limiter in its three ways of operation:
//  1. no limitation: frames pass unchanged and in order, with stalls;
//  2. timestamp limitation: every frame starts with a timestamp beat; each
//     packet (timestamp stripped) must leave no earlier than its timestamp
//     and at most 3 clocks later, while timestamps are spread unevenly;
//  3. rate limitation at 1/4 of the line rate: the time between the first
//     and the last packet start must match the bytes sent.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_packet_limiter;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ts_en = 0, rate_en = 0, rate_abs = 0;
  logic [31:0] rate = 32'd16384;
  logic [63:0] now = 0;
  fl_beat_t in, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, empty;
  logic [15:0] last_len;
  packet_limiter #(.PKT_FIFO_DEPTH(64), .TS_FIFO_DEPTH(8)) dut (
    .clk, .rst, .ts_en, .rate_en, .rate_abs, .rate, .now, .in, .in_valid, .in_ready,
    .out, .out_valid, .out_ready, .empty, .last_len);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  bit random_ready = 0;
  always @(posedge clk) begin #1; out_ready = random_ready ? ($urandom % 3 != 0) : 1'b1; end

  fl_beat_t exp_q [$];
  longint   due_q [$];
  longint   start_q [$];
  int       held_ts = 0;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    `CHECK(exp_q.size() > 0 && out == exp_q[0], "beat order/content")
    void'(exp_q.pop_front());
    if (out.sof) begin
      start_q.push_back(now);
      if (ts_en) begin
        `CHECK(now >= due_q[0] && now <= due_q[0] + 3,
               $sformatf("packet released at %0d, timestamp %0d", now, due_q[0]))
        void'(due_q.pop_front());
      end
    end
  end

  task automatic send(fl_beat_t b);
    bit ok;
    in = b; in_valid = 1;
    do begin @(posedge clk); ok = in_ready; #1; end while (!ok);
    in_valid = 0;
  endtask

  task automatic frame(int id, int bytes, bit with_ts, longint ts);
    int beats;
    fl_beat_t b;
    beats = (bytes + 7) / 8;
    if (with_ts) begin
      b = '{data: ts, rem: 3'd7, sof: 1'b1, eof: 1'b0};
      due_q.push_back(ts);
      send(b);
    end
    for (int i = 0; i < beats; i++) begin
      b = '{data: {32'(id), 32'(i)}, rem: 3'(i == beats - 1 ? bytes - 1 : 7),
            sof: (i == 0), eof: (i == beats - 1)};
      exp_q.push_back(b);
      if (with_ts) b.sof = 1'b0;
      send(b);
    end
  endtask

  longint t, span;
  int bytes_total;
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk); #1;
    // 1. unrestricted, with stalls
    random_ready = 1;
    for (int f = 0; f < 30; f++) frame(f, 60 + $urandom % 200, 0, 0);
    wait (exp_q.size() == 0); random_ready = 0;
    repeat (5) @(posedge clk); #1;
    `CHECK(empty, "empty after unrestricted run")
    // 2. timestamps: uneven gaps, some in the past
    ts_en = 1;
    t = now + 100;
    for (int f = 0; f < 40; f++) begin
      t += (f % 5 == 0) ? 300 : 20 + $urandom % 60;
      frame(100 + f, 64 + $urandom % 100, 1, t);
    end
    wait (exp_q.size() == 0 && due_q.size() == 0);
    repeat (5) @(posedge clk); #1;
    `CHECK(empty, "empty after timestamp run")
    ts_en = 0;
    // 3. rate limitation at a quarter of the line rate, 200-byte packets
    rate_en = 1;
    start_q = {};
    for (int f = 0; f < 30; f++) frame(200 + f, 200, 0, 0);
    wait (exp_q.size() == 0);
    span = start_q[29] - start_q[0];
    // 29 periods of 200*8 bits at 16 bits per clock
    `CHECK(span >= 29 * 100 - 3 && span <= 29 * 100 + 3, $sformatf("rate span %0d", span))
    rate_en = 0;
    `TB_FINISH
  end
endmodule
