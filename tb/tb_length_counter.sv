// Testbench of length_counter: frames of random length pass with random
// stalls; the stream must be unchanged and every frame's byte count must be
// reported once, the clock after its eof beat.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_length_counter;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0, in_ready, out_valid, out_ready = 1, in_pkt, len_valid;
  fl_beat_t in, out;
  logic [15:0] len;
  length_counter dut (.clk, .rst, .in, .in_valid, .in_ready, .out, .out_valid, .out_ready,
                      .in_pkt, .len, .len_valid);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  int exp_len [$];
  bit eof_seen = 0;
  always @(posedge clk) begin #1; out_ready = ($urandom % 3 != 0); end
  always @(posedge clk) if (!rst) begin
    if (eof_seen) begin
      `CHECK(len_valid && exp_len.size() > 0 && len == 16'(exp_len[0]),
             $sformatf("length %0d expected %0d", len, exp_len[0]))
      void'(exp_len.pop_front());
    end else if (len_valid) begin
      failures++; $display("spurious len_valid");
    end
    eof_seen = in_valid && out_ready && in.eof;
    if (out_valid) `CHECK(out == in && in_ready == out_ready, "pass-through")
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk); #1;
    for (int f = 0; f < 300; f++) begin
      int bytes, beats;
      bytes = (f % 7 == 0) ? 1 + $urandom % 8 : 60 + $urandom % 1455;
      beats = (bytes + 7) / 8;
      exp_len.push_back(bytes);
      for (int i = 0; i < beats; i++) begin
        bit ok;
        in.data = {32'(f), 32'(i)}; in.sof = (i == 0); in.eof = (i == beats - 1);
        in.rem = 3'(in.eof ? bytes - 1 : 7);
        in_valid = 1;
        do begin @(posedge clk); ok = in_ready; #1; end while (!ok);
        in_valid = 0;
        if ($urandom % 4 == 0) begin @(posedge clk); #1; end
      end
    end
    repeat (5) @(posedge clk);
    `CHECK(exp_len.size() == 0, "all lengths reported")
    `TB_FINISH
  end
endmodule
