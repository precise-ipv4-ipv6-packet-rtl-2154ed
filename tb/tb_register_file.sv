// Testbench of register_file: writes every configuration register over the
// MI32 bus, checks the configuration outputs, reads every register back
// (one-clock read latency), checks that field values are cut to the field
// width, that start/stop are one-clock pulses and that status inputs are
// readable.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_register_file;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, mi_wr = 0, mi_rd = 0, mi_ardy, mi_drdy, start, stop, busy = 0;
  logic [11:0] mi_addr = 0;
  logic [31:0] mi_dwr = 0, mi_drd, sent = 32'h1234_5678, mem_words = 32'd999;
  logic [2:0] state = 3'd5;
  pg_cfg_t cfg;
  field_cfg_t fcfg [NUM_FIELDS];
  register_file dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  int starts = 0, stops = 0;
  always @(posedge clk) if (!rst) begin starts += start; stops += stop; end

  task automatic wr(logic [11:0] a, logic [31:0] d);
    mi_addr = a; mi_dwr = d; mi_wr = 1; @(posedge clk); #1; mi_wr = 0;
  endtask
  task automatic rd(logic [11:0] a, output logic [31:0] d);
    mi_addr = a; mi_rd = 1; @(posedge clk); #1; mi_rd = 0;
    `CHECK(mi_drdy, "drdy one clock after rd")
    d = mi_drd;
    @(posedge clk); #1;
    `CHECK(!mi_drdy, "drdy is a pulse")
  endtask

  logic [31:0] d;
  field_val_t fv;
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk); #1;
    `CHECK(mi_ardy, "ardy")
    wr(REG_CONTROL, {19'd0, 1'b1, 1'b1, 1'b0, 1'b1, 1'b1, 1'b0, 3'(MODE_REPLAY), 4'b0001});
    `CHECK(cfg.mode == MODE_REPLAY && cfg.ipv6 && cfg.ts_present && !cfg.rate_en &&
           cfg.rate_abs && cfg.payload_random, "control fields")
    repeat (2) @(posedge clk); #1;
    `CHECK(starts == 1 && stops == 0, "one start pulse")
    wr(REG_CONTROL, 32'h0000_0012);
    `CHECK(cfg.mode == MODE_GEN && !cfg.ipv6, "control rewritten")
    repeat (2) @(posedge clk); #1;
    `CHECK(stops == 1 && starts == 1, "one stop pulse")
    wr(REG_PKTCNT, 32'd77);   wr(REG_RATE, 32'd2500);  wr(REG_PATTERN, 32'hCAFEBABE);
    wr(REG_DMAC_LO, 32'h3344_5566); wr(REG_DMAC_HI, 32'hFFFF_1122);
    wr(REG_SMAC_LO, 32'h9900_AABB); wr(REG_SMAC_HI, 32'h0000_7788);
    `CHECK(cfg.pkt_count == 77 && cfg.rate == 2500 && cfg.pattern == 32'hCAFEBABE, "count/rate/pattern")
    `CHECK(cfg.dst_mac == 48'h1122_3344_5566 && cfg.src_mac == 48'h7788_9900_AABB, "MACs")
    wr(REG_FMODES, 32'h0002_9164);
    for (int f = 0; f < NUM_FIELDS; f++)
      `CHECK(fcfg[f].mode == field_mode_e'(6'(32'h0002_9164 >> (2 * f))), $sformatf("mode of field %0d", f))
    for (int f = 0; f < NUM_FIELDS; f++)
      for (int s = 0; s < 3; s++)
        for (int w = 0; w < 4; w++)
          wr(REG_FIELD0 + 12'(64 * f + 16 * s + 4 * w), 32'hA000_0000 + 32'(256 * f + 16 * s + w));
    for (int f = 0; f < NUM_FIELDS; f++) begin
      for (int s = 0; s < 3; s++) begin
        for (int w = 0; w < 4; w++) fv[32*w +: 32] = 32'hA000_0000 + 32'(256 * f + 16 * s + w);
        fv &= ({128{1'b1}} >> (128 - field_width(f)));
        `CHECK((s == 0 ? fcfg[f].from : s == 1 ? fcfg[f].to : fcfg[f].inc) == fv,
               $sformatf("field %0d setting %0d", f, s))
        for (int w = 0; w < 4; w++) begin
          rd(REG_FIELD0 + 12'(64 * f + 16 * s + 4 * w), d);
          `CHECK(d == fv[32*w +: 32], $sformatf("read field %0d setting %0d word %0d", f, s, w))
        end
      end
    end
    rd(REG_PKTCNT, d);   `CHECK(d == 77, "read pkt count")
    rd(REG_DMAC_HI, d);  `CHECK(d == 32'h1122, "read MAC high")
    rd(REG_CONTROL, d);  `CHECK(d == 32'h0000_0010, "read control")
    busy = 1;
    rd(REG_STATUS, d);   `CHECK(d == {28'd0, 3'd5, 1'b1}, "read status")
    rd(REG_SENT, d);     `CHECK(d == 32'h1234_5678, "read sent")
    rd(REG_MEMWORDS, d); `CHECK(d == 32'd999, "read memory words")
    `TB_FINISH
  end
endmodule
