// Testbench of timestamp_extractor: frames made of a timestamp beat plus
// 1..5 packet beats are sent with random stalls on both outputs; the
// timestamps must come out on the timestamp port in order and the packets,
// with sof moved to their first beat, on the packet port. With ts_en low the
// stream must pass unchanged.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_timestamp_extractor;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ts_en = 1;
  fl_beat_t in, out;
  logic in_valid = 0, in_ready, ts_valid, ts_ready = 1, out_valid, out_ready = 1;
  logic [63:0] ts_data;
  timestamp_extractor dut (.clk, .rst, .ts_en, .in, .in_valid, .in_ready, .ts_data,
                           .ts_valid, .ts_ready, .out, .out_valid, .out_ready);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  fl_beat_t exp_q [$];
  logic [63:0] ts_q [$];
  always @(posedge clk) begin
    #1;
    ts_ready  = ($urandom % 4 != 0);
    out_ready = ($urandom % 4 != 0);
  end
  always @(posedge clk) if (!rst) begin
    if (ts_valid && ts_ready) begin
      `CHECK(ts_q.size() > 0 && ts_data == ts_q[0], $sformatf("timestamp %0d expected %0d (%0d queued)", ts_data, ts_q[0], ts_q.size()))
      void'(ts_q.pop_front());
    end
    if (out_valid && out_ready) begin
      `CHECK(exp_q.size() > 0 && out == exp_q[0], $sformatf("packet beat %p expected %p", out, exp_q[0]))
      void'(exp_q.pop_front());
    end
  end

  task automatic send(fl_beat_t b);
    bit ok;
    in = b; in_valid = 1;
    do begin @(posedge clk); ok = in_ready; #1; end while (!ok);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk); #1;
    for (int f = 0; f < 200; f++) begin
      int n;
      fl_beat_t b;
      n = 1 + $urandom % 5;
      if (f >= 150) ts_en = 0;
      if (ts_en) begin
        b = '{data: 64'(1000 * f), rem: 3'd7, sof: 1'b1, eof: 1'b0};
        ts_q.push_back(b.data);
        send(b);
      end
      for (int i = 0; i < n; i++) begin
        b = '{data: {32'(f), 32'(i)}, rem: (i == n - 1) ? 3'($urandom) : 3'd7,
              sof: (i == 0), eof: (i == n - 1)};
        exp_q.push_back(b);
        if (ts_en) b.sof = 1'b0;          // the frame started with the timestamp beat
        send(b);
      end
    end
    repeat (50) @(posedge clk);
    `CHECK(exp_q.size() == 0 && ts_q.size() == 0, "everything delivered")
    `TB_FINISH
  end
endmodule
