// Testbench of limiting_algorithm: a model transmitter starts a packet
// whenever allow is high, sends it for ceil(L/8) clocks and reports its
// length. The measured average time between packet starts must match the set
// rate: half line rate (64-byte packets every 16 clocks), a quarter (mixed
// lengths), 1000 Mbit/s absolute at 156.25 MHz (64 bytes every 80 clocks) and
// full line rate (no gap at all), then 60 random rates (relative and
// absolute, up to half the line rate) with random packet lengths.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_limiting_algorithm;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rate_abs = 0, in_pkt = 0, len_valid = 0, allow;
  logic [31:0] rate = 0;
  logic [15:0] len = 0;
  limiting_algorithm dut (.clk, .rst, .rate_abs, .rate, .in_pkt, .len, .len_valid, .allow);
  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  // returns clocks from the first of n+1 packet starts to the end of the last
  // packet (n periods plus the last packet's ceil(L/8)+1 clocks)
  task automatic measure(int n, int bytes_a, int bytes_b, output longint cycles,
                         output longint bits);
    longint t0, t;
    t = 0; t0 = 0; bits = 0;
    for (int p = 0; p <= n; p++) begin
      int bytes;
      bytes = (p % 2) ? bytes_b : bytes_a;
      while (!allow) begin @(posedge clk); #1; t++; end
      if (p == 0) t0 = t;
      if (p < n) bits += 8 * bytes;
      in_pkt = 1; #1;
      for (int b = 0; b < (bytes + 7) / 8; b++) begin @(posedge clk); #1; t++; end
      in_pkt = 0; len = 16'(bytes); len_valid = 1;
      @(posedge clk); #1; t++;
      len_valid = 0; #1;
    end
    cycles = t - t0;
  endtask

  longint c, b;
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk); #1;
    rate = 32768;   // half of the line rate
    measure(40, 64, 64, c, b);
    `CHECK(c >= 40 * 16 + 9 - 2 && c <= 40 * 16 + 9 + 2, $sformatf("half rate: %0d clocks", c))
    rate = 16384;   // quarter, mixed lengths: 64 bits per clock * 1/4 = 16 bits/clock
    measure(40, 1500, 100, c, b);
    `CHECK(c >= b / 16 + 189 - 2 && c <= b / 16 + 189 + 2, $sformatf("quarter rate: %0d clocks for %0d bits", c, b))
    rate_abs = 1; rate = 1000;  // 1 Gbit/s: 512 bits take 80 clocks at 156.25 MHz
    measure(30, 64, 64, c, b);
    `CHECK(c >= 30 * 80 + 9 - 2 && c <= 30 * 80 + 9 + 2, $sformatf("1000 Mbit/s: %0d clocks", c))
    rate_abs = 1; rate = 5000;  // 5 Gbit/s, 1500-byte packets: 12000 bits in 375 clocks
    measure(20, 1500, 1500, c, b);
    `CHECK(c >= 20 * 375 + 189 - 2 && c <= 20 * 375 + 189 + 2, $sformatf("5000 Mbit/s: %0d clocks", c))
    rate_abs = 0; rate = 65536; // full line rate: packet start right after the length
    measure(20, 64, 64, c, b);
    `CHECK(c == 20 * 9 + 9, $sformatf("full rate: %0d clocks", c))
    // idle time must not build up a burst
    rate = 32768;
    repeat (500) @(posedge clk); #1;
    measure(10, 64, 64, c, b);
    `CHECK(c >= 10 * 16 + 9 - 2 && c <= 10 * 16 + 9 + 2, $sformatf("after idle: %0d clocks", c))
    // random sweep, relative and absolute rates up to half the line rate
    // (so the rate, not the packet duration, sets the spacing): the n
    // periods must take bits / (bits per clock) clocks, plus the last packet
    for (int k = 0; k < 60; k++) begin
      int la, lb;
      real per_clk, expect_c;
      la = 60 + $urandom % 1455; lb = 60 + $urandom % 1455;
      rate_abs = (k >= 30);
      if (rate_abs) begin
        rate = 500 + $urandom % 4500;              // Mbit/s
        per_clk = real'(rate) / 156.25;
      end else begin
        rate = 8192 + $urandom % 24577;            // fraction of 65536
        per_clk = 64.0 * real'(rate) / 65536.0;
      end
      measure(8, la, lb, c, b);
      expect_c = real'(b) / per_clk + real'((la + 7) / 8 + 1);
      `CHECK(real'(c) >= expect_c - 3.0 && real'(c) <= expect_c + 3.0,
             $sformatf("sweep %0d: rate %0d (%s), lengths %0d/%0d: %0d clocks, expected %.1f",
                       k, rate, rate_abs ? "Mbit/s" : "relative", la, lb, c, expect_c))
    end
    `TB_FINISH
  end
endmodule
