// Testbench of timestamp_comparator: go must rise exactly one clock after
// the running time reaches the head timestamp, stay low before, and fall
// when the timestamp is popped or the FIFO is empty.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_timestamp_comparator;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ts_valid = 0, ts_pop = 0, go;
  logic [63:0] now = 0, ts_head = 0;
  timestamp_comparator dut (.clk, .rst, .now, .ts_head, .ts_valid, .ts_pop, .go);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int n = 0; n < 50; n++) begin
      longint t;
      t = now + 5 + $urandom % 40;
      ts_head <= t; ts_valid <= 1;
      @(posedge clk);
      while (now != t) begin
        #1 `CHECK(!go, "go before its time");
        @(posedge clk);
      end
      @(posedge clk); #1;
      `CHECK(go, "go one clock after now reaches the timestamp")
      ts_pop <= 1; @(posedge clk); ts_pop <= 0; #1;
      `CHECK(!go, "go cleared by pop")
      ts_valid <= 0; @(posedge clk); @(posedge clk); #1;
      `CHECK(!go, "no go without a timestamp")
    end
    // a timestamp already in the past releases at once
    ts_head <= 64'd3; ts_valid <= 1; @(posedge clk); @(posedge clk); #1;
    `CHECK(go, "past timestamp")
    `TB_FINISH
  end
endmodule
