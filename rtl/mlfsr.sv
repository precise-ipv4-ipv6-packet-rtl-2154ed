// Multiple-LFSR (MLFSR) pseudo-random number generator.
//
// Three maximal-length Fibonacci LFSRs of different lengths (33, 39 and 47
// bits, XOR feedback) run side by side. Each one is advanced 32 steps per
// clock (leap-forward, unrolled in combinational logic), so every clock yields
// 32 fresh bits from each register; the output word is the XOR of the low 32
// bits of the three states. Unlike a single LFSR, the combined output can be
// zero. The idea of running several LFSRs in parallel and combining them is
// the generator's; the lengths, taps, leap of 32 and XOR combination are this
// design's choice.
//
// With MULTI = 0 the output is the low 32 bits of the 47-bit register alone:
// a single LFSR, smaller but with poorer statistics, for designs that trade
// quality for area (the generator lets the user choose the implementation of
// its random sources; this single-LFSR option is this design's form of it).
//
// Interface: en advances the generator by one output word; rnd is the current
// word (registered). SEED sets the reset state; each of the three registers is
// seeded from it and forced non-zero. Latency: rnd changes the clock after en.
module mlfsr #(
  parameter logic [63:0] SEED  = 64'h0123_4567_89AB_CDEF,
  parameter bit          MULTI = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [31:0] rnd
);

  localparam int L0 = 33;   // x^33 + x^20 + 1
  localparam int L1 = 39;   // x^39 + x^35 + 1
  localparam int L2 = 47;   // x^47 + x^42 + 1
  localparam int STEPS = 32;

  logic [L0-1:0] s0, s0_n;
  logic [L1-1:0] s1, s1_n;
  logic [L2-1:0] s2, s2_n;

  // One Fibonacci step: feedback from the tap bits enters at bit 0
  always_comb begin
    s0_n = s0;
    s1_n = s1;
    s2_n = s2;
    for (int i = 0; i < STEPS; i++) begin
      s0_n = {s0_n[L0-2:0], s0_n[32] ^ s0_n[19]};
      s1_n = {s1_n[L1-2:0], s1_n[38] ^ s1_n[34]};
      s2_n = {s2_n[L2-2:0], s2_n[46] ^ s2_n[41]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s0 <= {SEED[L0-2:0], 1'b1};
      s1 <= {SEED[63:64-L1+1] ^ SEED[L1-2:0], 1'b1};
      s2 <= {SEED[L2-2:0] ^ {SEED[23:0], SEED[45:24]}, 1'b1};
    end else if (en) begin
      s0 <= s0_n;
      s1 <= s1_n;
      s2 <= s2_n;
    end
  end

  if (MULTI) begin : g_multi
    assign rnd = s0[31:0] ^ s1[31:0] ^ s2[31:0];
  end else begin : g_single
    assign rnd = s2[31:0];
  end

endmodule
