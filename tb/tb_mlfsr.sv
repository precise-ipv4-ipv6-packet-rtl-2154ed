// Testbench of mlfsr: compares 300 output words with a reference model that
// steps the three Fibonacci LFSRs one bit at a time from their polynomials,
// and checks the bit balance and that words do not repeat. A second
// instance with MULTI = 0 must give the 47-bit register's low word alone.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_mlfsr;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  logic [31:0] rnd;
  localparam logic [63:0] SEED = 64'hDEAD_BEEF_1234_5678;

  logic [31:0] rnd1;
  mlfsr #(.SEED(SEED)) dut (.clk, .rst, .en, .rnd);
  mlfsr #(.SEED(SEED), .MULTI(1'b0)) dut1 (.clk, .rst, .en, .rnd(rnd1));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  // reference: state as bit queue, polynomial x^L + x^T + 1
  function automatic logic [63:0] step(logic [63:0] s, int L, int T);
    logic fb;
    fb = s[L-1] ^ s[T-1];
    s  = (s << 1) | 64'(fb);
    return s & ((64'd1 << L) - 1);
  endfunction

  logic [63:0] r0, r1, r2;
  logic [31:0] exp_w, seen [$];
  int ones;

  initial begin
    r0 = {SEED[31:0], 1'b1};
    r1 = {SEED[63:26] ^ SEED[37:0], 1'b1};
    r2 = {SEED[45:0] ^ {SEED[23:0], SEED[45:24]}, 1'b1};
    ones = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      exp_w = r0[31:0] ^ r1[31:0] ^ r2[31:0];
      `CHECK(rnd == exp_w, $sformatf("word %0d: %h expected %h", n, rnd, exp_w))
      `CHECK(rnd1 == r2[31:0], $sformatf("single LFSR word %0d: %h expected %h", n, rnd1, r2[31:0]))
      foreach (seen[k]) if (seen[k] == rnd) begin
        failures++; $display("repeat at %0d", n);
      end
      seen.push_back(rnd);
      ones += $countones(rnd);
      for (int s = 0; s < 32; s++) begin
        r0 = step(r0, 33, 20); r1 = step(r1, 39, 35); r2 = step(r2, 47, 42);
      end
      en <= 1; @(posedge clk); en <= 0; @(posedge clk);
    end
    // hold: en low keeps the word
    exp_w = rnd; repeat (5) @(posedge clk);
    `CHECK(rnd == exp_w, "word must hold while en is low")
    `CHECK(ones > 300*16 - 400 && ones < 300*16 + 400, $sformatf("bit balance %0d", ones))
    `TB_FINISH
  end
endmodule
