// Testbench of main_control_fsm: walks through every mode of operation and
// checks routing, enables, choice of limitation, the wr_start/rd_start
// pulses and the conditions that end each run (generation done or stop,
// stop or memory full while loading, end of replay) including the drain
// state that waits for the completer and the limiter.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_main_control_fsm;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, stop = 0, ts_present = 0, rate_req = 0;
  logic gen_done = 0, gen_idle = 1, mem_full = 0, rd_busy = 0, lim_empty = 1;
  pg_mode_e req_mode = MODE_NIC, route;
  logic gen_en, lim_ts_en, lim_rate_en, ts_gen_en, wr_start, rd_start, busy;
  logic [2:0] state_code;
  main_control_fsm dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  int wr_starts = 0, rd_starts = 0;
  always @(posedge clk) begin wr_starts += wr_start; rd_starts += rd_start; end
  task automatic cyc(int n = 1); repeat (n) @(posedge clk); #1; endtask
  task automatic go(pg_mode_e m); req_mode = m; start = 1; cyc(); start = 0; cyc(); endtask

  initial begin
    cyc(3); rst = 0; cyc();
    `CHECK(route == MODE_NIC && !busy && !gen_en && !lim_ts_en && !lim_rate_en, "idle as NIC")
    go(MODE_NIC);
    `CHECK(route == MODE_NIC && !busy, "NIC request stays idle")
    // generation with rate limitation, ended by done
    rate_req = 1; ts_present = 1;
    go(MODE_GEN);
    `CHECK(route == MODE_GEN && gen_en && lim_rate_en && !lim_ts_en && busy, "generation set-up")
    gen_idle = 0; gen_done = 1; cyc();
    `CHECK(!gen_en && busy && route == MODE_GEN, "drain after done")
    gen_done = 0; cyc(3);
    `CHECK(busy, "waits for completer")
    gen_idle = 1; cyc(2);
    `CHECK(!busy && route == MODE_NIC, "back to NIC after generation")
    // generation ended by stop
    rate_req = 0;
    go(MODE_GEN);
    `CHECK(gen_en && !lim_rate_en, "generation without limitation")
    stop = 1; cyc(); stop = 0; cyc(2);
    `CHECK(!busy, "stop ends generation")
    // host load ended by stop
    go(MODE_LOAD_HOST);
    `CHECK(route == MODE_LOAD_HOST && wr_starts == 1 && busy, "host load set-up")
    cyc(10);
    `CHECK(busy, "host load runs until stop")
    stop = 1; cyc(); stop = 0; cyc(2);
    `CHECK(!busy && route == MODE_NIC, "stop ends host load")
    // network load ended by memory full
    go(MODE_LOAD_NET);
    `CHECK(route == MODE_LOAD_NET && wr_starts == 2, "network load set-up")
    mem_full = 1; cyc(3); mem_full = 0;
    `CHECK(!busy, "memory full ends network load")
    // replay with timestamps and rate limitation
    ts_present = 1; rate_req = 1;
    go(MODE_REPLAY);
    `CHECK(route == MODE_REPLAY && rd_starts == 1 && lim_ts_en && ts_gen_en && lim_rate_en,
           "replay set-up with timestamps")
    rd_busy = 1; cyc(10);
    `CHECK(busy, "replay runs while reading")
    rd_busy = 0; lim_empty = 0; cyc(3);
    `CHECK(busy && lim_ts_en && route == MODE_REPLAY, "replay drains through limiter")
    lim_empty = 1; cyc(2);
    `CHECK(!busy && !ts_gen_en, "replay finished")
    // replay without timestamps
    ts_present = 0; rate_req = 0;
    go(MODE_REPLAY);
    `CHECK(!lim_ts_en && !ts_gen_en && !lim_rate_en, "replay, no limitation")
    rd_busy = 1; cyc(2); rd_busy = 0; cyc(3);
    `CHECK(!busy, "second replay finished")
    `TB_FINISH
  end
endmodule
