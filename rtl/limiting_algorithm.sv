// Limiting algorithm: keeps the average output bit rate at the set value by
// delaying the start of the next packet.
//
// A signed credit, in units of 2^-16 bit, grows every clock by the number of
// bits the set rate allows per clock; when the length counter reports the
// length L of the packet just sent, 8*L bits are taken off. The next packet
// may start (allow) only while the credit is not negative, so after a packet
// the start of the next one is delayed until the link average is back at the
// set rate. Between packets (in_pkt low) the credit is capped at one clock's
// worth, so an idle link saves up no burst while the fraction of a clock left
// when a packet is released is kept and the average stays exact.
//
// Rate setting: rate_abs = 0 gives a fraction of the line rate, rate/65536
// of FL_DW bits per clock (65536 = full line rate); rate_abs = 1 gives the
// rate in Mbit/s, converted with the clock frequency CLK_KHZ. The count
// covers frame bytes only, not preamble or inter-frame gap. The credit scheme
// and both encodings are this design's choice; the inputs (set rate and the
// last packet's length) follow the generator's description.
module limiting_algorithm
  import pg_pkg::*;
#(
  parameter int CLK_KHZ = 156250
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rate_abs,
  input  logic [31:0] rate,
  input  logic        in_pkt,
  input  logic [15:0] len,
  input  logic        len_valid,
  output logic        allow
);

  // credit added per clock for 1 Mbit/s, Q8 fixed point of the Q16 unit
  // (rounded up, so that the set rate is reached and not undershot)
  localparam longint INC_PER_MBPS_Q8 = ((64'd1000 << 24) + 64'(CLK_KHZ) - 1) / 64'(CLK_KHZ);

  logic signed [47:0] credit, credit_n;
  logic        [47:0] inc;
  logic        [63:0] abs_prod;

  always_comb begin
    abs_prod = 64'(rate) * 64'(INC_PER_MBPS_Q8);
    if (rate_abs) inc = abs_prod[55:8];
    else          inc = 48'(rate[16:0]) * 48'(FL_DW);
    credit_n = credit + $signed(inc);
    if (len_valid) credit_n = credit_n - $signed({16'd0, len, 16'd0} << 3);
    if (!in_pkt && !len_valid && credit_n > $signed(inc)) credit_n = $signed(inc);
  end

  always_ff @(posedge clk) begin
    if (rst) credit <= '0;
    else     credit <= credit_n;
  end

  assign allow = (credit >= 0) && !len_valid;

endmodule
