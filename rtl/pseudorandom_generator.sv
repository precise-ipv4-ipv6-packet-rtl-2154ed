// Pseudo-random generator: one field generator per generated header field.
//
// The set of fields is listed in pg_pkg (payload length, TOS/traffic class,
// identification, flags/fragment offset, flow label, TTL/hop limit,
// protocol/next header, source and destination address). Each field has its
// own width, its own MLFSR-based random source (distinct seeds) and its own
// from/to/increment_size settings and mode. All fields step together: restart
// starts a new run, next moves every field to its value for the next packet.
// Values are zero-extended to FIELD_MAX_W and valid the clock after a pulse.
// RNG_MULTI selects the random source: 1 = MLFSR (default), 0 = single LFSR.
module pseudorandom_generator
  import pg_pkg::*;
#(
  parameter bit RNG_MULTI = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  field_cfg_t cfg [NUM_FIELDS],
  input  logic       restart,
  input  logic       next,
  output field_val_t values [NUM_FIELDS]
);

  for (genvar f = 0; f < NUM_FIELDS; f++) begin : g_field
    localparam int W = field_width(f);
    logic [W-1:0] v;

    field_generator #(
      .WIDTH (W),
      .SEED  (64'hA5A5_0F0F_3C3C_9669 + 64'(f) * 64'h0001_0003_0007_000F),
      .RNG_MULTI(RNG_MULTI)
    ) u_fg (
      .clk     (clk),
      .rst     (rst),
      .mode    (cfg[f].mode),
      .from    (cfg[f].from[W-1:0]),
      .to      (cfg[f].to[W-1:0]),
      .inc     (cfg[f].inc[W-1:0]),
      .restart (restart),
      .next    (next),
      .value   (v)
    );

    assign values[f] = field_val_t'(v);
  end

endmodule
