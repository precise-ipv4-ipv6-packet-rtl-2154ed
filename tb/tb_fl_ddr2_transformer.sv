// Testbench of fl_ddr2_transformer with the DDR2 controller model: stores
// 60 frames (random lengths, random controller stalls), checks the stored
// word count, replays them twice with a stalling consumer and compares every
// beat, checks rd_busy, a second store after wr_start, and the memory-full
// stop with a small address space.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_fl_ddr2_transformer;
  import pg_pkg::*;
  localparam int AW = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, wr_start = 0, rd_start = 0;
  fl_beat_t in, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, rd_busy, mem_full;
  logic [AW:0] words_stored;
  logic cmd_valid, cmd_ready, cmd_we, rd_valid;
  logic [AW-1:0] cmd_addr;
  logic [MEM_W-1:0] cmd_wdata, rd_data;

  fl_ddr2_transformer #(.ADDR_W(AW), .RD_DEPTH(16)) dut (
    .clk, .rst, .wr_start, .in, .in_valid, .in_ready, .words_stored, .mem_full,
    .rd_start, .out, .out_valid, .out_ready, .rd_busy,
    .cmd_valid, .cmd_ready, .cmd_we, .cmd_addr, .cmd_wdata, .rd_valid, .rd_data);
  ddr2_model #(.ADDR_W(AW), .LATENCY(9)) mem (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd_we, .cmd_addr, .cmd_wdata, .rd_valid, .rd_data);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  bit random_ready = 0;
  always @(posedge clk) begin #1; out_ready = random_ready ? ($urandom % 3 != 0) : 1'b1; end

  fl_beat_t stored [$];
  fl_beat_t exp_q [$];
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    `CHECK(exp_q.size() > 0 && out == exp_q[0], "replayed beat")
    void'(exp_q.pop_front());
  end

  task automatic send(fl_beat_t b);
    bit ok;
    in = b; in_valid = 1;
    do begin @(posedge clk); ok = in_ready; #1; end while (!ok);
    in_valid = 0;
  endtask
  task automatic pulse(ref logic s); s = 1; @(posedge clk); #1; s = 0; endtask

  task automatic store(int nframes);
    stored = {};
    pulse(wr_start);
    for (int f = 0; f < nframes; f++) begin
      int beats;
      beats = 1 + $urandom % 12;
      for (int i = 0; i < beats; i++) begin
        fl_beat_t b;
        b = '{data: {$urandom, $urandom}, rem: 3'($urandom), sof: (i == 0), eof: (i == beats - 1)};
        stored.push_back(b);
        send(b);
      end
    end
    @(posedge clk); #1;
  endtask

  task automatic replay();
    exp_q = stored;
    pulse(rd_start);
    #1 `CHECK(rd_busy, "rd_busy after rd_start")
    wait (!rd_busy); @(posedge clk); #1;
    `CHECK(exp_q.size() == 0, $sformatf("all words replayed (%0d left)", exp_q.size()))
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk); #1;
    store(60);
    `CHECK(words_stored == (AW+1)'(stored.size()), "word count")
    random_ready = 1;
    replay();
    replay();
    random_ready = 0;
    store(5);
    `CHECK(words_stored == (AW+1)'(stored.size()), "word count after second store")
    replay();
    // fill the 1024-word memory
    pulse(wr_start);
    for (int i = 0; i < 1024; i++) send('{data: 64'(i), rem: 3'd7, sof: 1'b1, eof: 1'b1});
    @(posedge clk); #1;
    `CHECK(mem_full && !in_ready, "memory full stops the write side")
    `TB_FINISH
  end
endmodule
