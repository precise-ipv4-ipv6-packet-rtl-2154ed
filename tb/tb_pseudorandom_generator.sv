// Testbench of pseudorandom_generator: every field gets its own setting and
// the test checks that each output follows its own field's configuration
// (constant, sequence or random range) at its own width.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_pseudorandom_generator;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, restart = 0, next = 0;
  field_cfg_t cfg [NUM_FIELDS];
  field_val_t values [NUM_FIELDS];

  pseudorandom_generator dut (.clk, .rst, .cfg, .restart, .next, .values);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  longint exp_seq [NUM_FIELDS];
  initial begin
    // field f: sequence from 3+f, step f+1, to 3+f+10*(f+1)
    for (int f = 0; f < NUM_FIELDS; f++) begin
      cfg[f].mode = FM_SEQ;
      cfg[f].from = field_val_t'(3 + f);
      cfg[f].inc  = field_val_t'(f + 1);
      cfg[f].to   = field_val_t'(3 + f + 10 * (f + 1));
      exp_seq[f]  = 3 + f;
    end
    cfg[F_TTL].mode = FM_CONST;  cfg[F_TTL].from = 128'd64;
    cfg[F_SRC].mode = FM_RANDOM; cfg[F_SRC].from = {32'hFD00_0000, 96'd0};
    cfg[F_SRC].to   = {32'hFD00_0000, 64'd0, 32'hFFFF_FFFF};
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    restart <= 1; @(posedge clk); restart <= 0; @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      for (int f = 0; f < NUM_FIELDS; f++) begin
        if (f == F_TTL) begin
          `CHECK(values[f] == 128'd64, "const field")
        end else if (f == F_SRC) begin
          `CHECK(values[f] >= cfg[f].from && values[f] <= cfg[f].to,
                 $sformatf("random field %h", values[f]))
        end else begin
          `CHECK(values[f] == field_val_t'(exp_seq[f]),
                 $sformatf("field %0d: %0d expected %0d", f, values[f], exp_seq[f]))
          exp_seq[f] = (exp_seq[f] + f + 1 > 3 + f + 10 * (f + 1)) ? 3 + f : exp_seq[f] + f + 1;
        end
      end
      next <= 1; @(posedge clk); next <= 0; @(posedge clk);
    end
    // widths: the 8-bit protocol field keeps only 8 bits
    cfg[F_PROTO].mode = FM_CONST; cfg[F_PROTO].from = 128'h1_23; #1;
    `CHECK(values[F_PROTO] == 128'h23, "field truncated to its width")
    `TB_FINISH
  end
endmodule
