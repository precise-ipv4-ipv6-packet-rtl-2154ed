// Testbench of sync_fifo: random pushes and pops against a queue model,
// checking head data, empty/full flags and the word count, including the
// full FIFO.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic full, empty;
  logic [4:0] count;
  sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.clk, .rst, .push, .wr_data, .full, .pop,
                                           .rd_data, .empty, .count);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  logic [15:0] q [$];
  bit saw_full = 0;
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      bit do_push, do_pop;
      int bias;
      bias = (n / 500) % 2 ? 3 : 7;
      do_push = ($urandom % 10 < bias) && q.size() < 16;
      do_pop  = ($urandom % 10 < 10 - bias) && q.size() > 0;
      push <= do_push; pop <= do_pop; wr_data <= 16'($urandom);
      #1;
      `CHECK(count == 5'(q.size()), "count")
      `CHECK(empty == (q.size() == 0) && full == (q.size() == 16), "flags")
      if (q.size() > 0) `CHECK(rd_data == q[0], "head data")
      if (full) saw_full = 1;
      @(posedge clk);
      if (do_pop) void'(q.pop_front());
      if (do_push) q.push_back(wr_data);
    end
    push <= 0; pop <= 0;
    `CHECK(saw_full, "FIFO reached full")
    `TB_FINISH
  end
endmodule
