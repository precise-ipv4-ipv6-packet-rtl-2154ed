// Generator of one packet-header field.
//
// Each field has three settings, from, to and increment_size, and a mode:
//   FM_CONST  - the field is the constant held in "from";
//   FM_SEQ    - from, from+inc, from+2*inc, ...; when the next value would
//               pass "to", the sequence restarts at "from";
//   FM_RANDOM - a pseudo-random number normalised to [from, to] as
//               from + ((rnd * (to - from + 1)) >> WIDTH): the division of the
//               normalisation is a shift and the product maps onto DSP blocks.
// Random bits come from ceil(WIDTH/32) MLFSR instances with distinct seeds
// (single LFSRs instead when RNG_MULTI = 0).
//
// Interface: restart loads the first value of a run (from, or a random
// value), next steps to the following one; value is valid the clock after
// either pulse (const mode follows "from" directly). If to < from in random
// mode the range is taken modulo 2^WIDTH+1 and the result is not meaningful.
// The three modes and the from/to/increment_size settings follow the
// generator's description; the exact restart rule and the MLFSR slicing are
// this design's choice.
module field_generator
  import pg_pkg::*;
#(
  parameter int          WIDTH = 16,
  parameter logic [63:0] SEED  = 64'h1357_9BDF_2468_ACE0,
  parameter bit          RNG_MULTI = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  field_mode_e      mode,
  input  logic [WIDTH-1:0] from,
  input  logic [WIDTH-1:0] to,
  input  logic [WIDTH-1:0] inc,
  input  logic             restart,
  input  logic             next,
  output logic [WIDTH-1:0] value
);

  localparam int NSLICE = (WIDTH + 31) / 32;

  logic [NSLICE*32-1:0] rnd_all;
  logic [WIDTH-1:0]     rnd;

  for (genvar g = 0; g < NSLICE; g++) begin : g_rng
    mlfsr #(.SEED(SEED ^ (64'h9E37_79B9_7F4A_7C15 * 64'(g + 1))), .MULTI(RNG_MULTI)) u_mlfsr (
      .clk (clk),
      .rst (rst),
      .en  (restart | next),
      .rnd (rnd_all[g*32 +: 32])
    );
  end

  assign rnd = rnd_all[WIDTH-1:0];

  logic [WIDTH:0]       range;
  logic [2*WIDTH:0]     prod;
  logic [WIDTH-1:0]     rnd_norm;
  logic [WIDTH:0]       seq_sum;
  logic [WIDTH-1:0]     seq_next;
  logic [WIDTH-1:0]     val_q;

  always_comb begin
    range    = {1'b0, to} - {1'b0, from} + 1'b1;
    prod     = {{(WIDTH+1){1'b0}}, rnd} * {{WIDTH{1'b0}}, range};
    rnd_norm = from + prod[2*WIDTH-1:WIDTH];
    seq_sum  = {1'b0, val_q} + {1'b0, inc};
    seq_next = (seq_sum > {1'b0, to}) ? from : seq_sum[WIDTH-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      val_q <= '0;
    end else if (restart) begin
      val_q <= (mode == FM_RANDOM) ? rnd_norm : from;
    end else if (next) begin
      case (mode)
        FM_SEQ:    val_q <= seq_next;
        FM_RANDOM: val_q <= rnd_norm;
        default:   val_q <= from;
      endcase
    end
  end

  assign value = (mode == FM_CONST) ? from : val_q;

endmodule
