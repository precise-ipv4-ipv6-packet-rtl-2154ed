// Packet completer: puts an Ethernet frame carrying an IPv4 or IPv6 packet
// together and sends it as a FrameLink stream, 8 bytes per beat.
//
// For each packet it takes the current values of the field generators (a
// field the software set to constant mode simply shows its "from" value),
// builds the Ethernet header (destination MAC, source MAC, EtherType 0x0800
// or 0x86DD) and the IP header in a 64-byte buffer, then streams header and
// payload. The payload is the 32-bit pattern register repeated, or
// pseudo-random bytes. The payload length comes from the length field
// generator (constant, sequence or random) and is clamped so that the frame
// is 60..1514 bytes (the FCS is appended by the MAC). The IPv4 total length
// or IPv6 payload length field follows that length, and the IPv4 header
// checksum is computed; IPv4 headers have no options (IHL = 5).
//
// Interface: while en is high, frames are produced back to back until
// pkt_count frames were sent (pkt_count = 0: no limit); done then stays high
// until en falls. fld_restart/fld_next drive the pseudo-random generator;
// the fields of the next packet are stepped as soon as a header is captured,
// so consecutive frames leave with no idle cycle between them when tx_ready
// stays high. Frame layout, byte order (byte 0 in data[7:0]) and the length
// rules are this design's choice; the field selection and the
// pattern-or-generated payload follow the generator's description.
module packet_completer
  import pg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        ipv6,
  input  logic        payload_random,
  input  logic [31:0] pattern,
  input  logic [47:0] dst_mac,
  input  logic [47:0] src_mac,
  input  logic [31:0] pkt_count,
  input  field_val_t  values [NUM_FIELDS],
  output logic        fld_restart,
  output logic        fld_next,
  output fl_beat_t    tx,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic        done,
  output logic [31:0] sent
);

  typedef enum logic [1:0] {S_IDLE, S_PREP, S_SEND, S_DONE} state_e;
  state_e state;

  logic [7:0]  hdr_n [64];
  logic [7:0]  hdr_q [64];
  logic [5:0]  hlen_n, hlen_q;
  logic [10:0] flen_n, flen_q;               // frame length in bytes
  logic [7:0]  beat_idx;

  // ---------------------------------------------------------------- header
  logic [15:0] plen;
  logic [15:0] v4_totlen;
  logic [19:0] csum_acc;
  logic [15:0] csum;

  always_comb begin
    logic [15:0] pmin, pmax;
    pmin   = ipv6 ? 16'd6 : 16'd26;
    pmax   = ipv6 ? 16'd1460 : 16'd1480;
    plen   = values[F_LEN][15:0];
    if (plen < pmin) plen = pmin;
    if (plen > pmax) plen = pmax;
    hlen_n = ipv6 ? 6'd54 : 6'd34;
    flen_n = 11'(plen) + 11'(hlen_n);
    v4_totlen = plen + 16'd20;

    csum_acc = 20'h04500 + 20'(values[F_TC][7:0]) + 20'(v4_totlen)
             + 20'(values[F_ID][15:0]) + 20'(values[F_FRAG][15:0])
             + 20'({values[F_TTL][7:0], values[F_PROTO][7:0]})
             + 20'(values[F_SRC][31:16]) + 20'(values[F_SRC][15:0])
             + 20'(values[F_DST][31:16]) + 20'(values[F_DST][15:0]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum     = ~csum_acc[15:0];

    for (int i = 0; i < 64; i++) hdr_n[i] = 8'h00;
    for (int i = 0; i < 6; i++) begin
      hdr_n[i]     = dst_mac[47-8*i -: 8];
      hdr_n[6 + i] = src_mac[47-8*i -: 8];
    end
    if (!ipv6) begin
      hdr_n[12] = 8'h08; hdr_n[13] = 8'h00;
      hdr_n[14] = 8'h45;
      hdr_n[15] = values[F_TC][7:0];
      hdr_n[16] = v4_totlen[15:8];        hdr_n[17] = v4_totlen[7:0];
      hdr_n[18] = values[F_ID][15:8];     hdr_n[19] = values[F_ID][7:0];
      hdr_n[20] = values[F_FRAG][15:8];   hdr_n[21] = values[F_FRAG][7:0];
      hdr_n[22] = values[F_TTL][7:0];
      hdr_n[23] = values[F_PROTO][7:0];
      hdr_n[24] = csum[15:8];             hdr_n[25] = csum[7:0];
      for (int i = 0; i < 4; i++) begin
        hdr_n[26 + i] = values[F_SRC][31-8*i -: 8];
        hdr_n[30 + i] = values[F_DST][31-8*i -: 8];
      end
    end else begin
      hdr_n[12] = 8'h86; hdr_n[13] = 8'hDD;
      hdr_n[14] = {4'h6, values[F_TC][7:4]};
      hdr_n[15] = {values[F_TC][3:0], values[F_FLOW][19:16]};
      hdr_n[16] = values[F_FLOW][15:8];   hdr_n[17] = values[F_FLOW][7:0];
      hdr_n[18] = plen[15:8];             hdr_n[19] = plen[7:0];
      hdr_n[20] = values[F_PROTO][7:0];
      hdr_n[21] = values[F_TTL][7:0];
      for (int i = 0; i < 16; i++) begin
        hdr_n[22 + i] = values[F_SRC][127-8*i -: 8];
        hdr_n[38 + i] = values[F_DST][127-8*i -: 8];
      end
    end
  end

  // ---------------------------------------------------------------- payload
  logic [63:0] prnd;
  logic        beat_fire;
  assign beat_fire = tx_valid & tx_ready;

  mlfsr #(.SEED(64'hC0FF_EE00_1234_5678)) u_pay_lo (
    .clk(clk), .rst(rst), .en(beat_fire), .rnd(prnd[31:0]));
  mlfsr #(.SEED(64'h0BAD_F00D_8765_4321)) u_pay_hi (
    .clk(clk), .rst(rst), .en(beat_fire), .rnd(prnd[63:32]));

  logic [10:0] last_beat;
  assign last_beat = 11'((flen_q - 11'd1) >> 3);

  always_comb begin
    tx = '0;
    for (int k = 0; k < 8; k++) begin
      logic [10:0] j;
      logic [10:0] off;
      j   = {beat_idx, 3'(k)};
      off = j - 11'(hlen_q);
      if (j < 11'(hlen_q))
        tx.data[8*k +: 8] = hdr_q[j[5:0]];
      else if (payload_random)
        tx.data[8*k +: 8] = prnd[8*k +: 8];
      else
        tx.data[8*k +: 8] = pattern[31-8*off[1:0] -: 8];
    end
    tx.sof = (beat_idx == 8'd0);
    tx.eof = (11'(beat_idx) == last_beat);
    tx.rem = tx.eof ? 3'(flen_q - 11'd1) : 3'd7;
  end

  // ---------------------------------------------------------------- control
  assign tx_valid = (state == S_SEND);
  assign done     = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      beat_idx    <= '0;
      sent        <= '0;
      hlen_q      <= '0;
      flen_q      <= 11'd64;
      fld_restart <= 1'b0;
      fld_next    <= 1'b0;
      for (int i = 0; i < 64; i++) hdr_q[i] <= '0;
    end else begin
      fld_restart <= 1'b0;
      fld_next    <= 1'b0;
      case (state)
        S_IDLE: if (en) begin
          fld_restart <= 1'b1;
          sent        <= '0;
          state       <= S_PREP;
        end
        S_PREP: if (!fld_restart) begin
          // field values of the new run are valid now
          hdr_q    <= hdr_n;
          hlen_q   <= hlen_n;
          flen_q   <= flen_n;
          beat_idx <= '0;
          fld_next <= 1'b1;
          state    <= S_SEND;
        end
        S_SEND: if (beat_fire) begin
          if (tx.eof) begin
            sent     <= sent + 1'b1;
            beat_idx <= '0;
            if (pkt_count != 0 && sent + 1'b1 == pkt_count) begin
              state <= S_DONE;
            end else if (en) begin
              hdr_q    <= hdr_n;
              hlen_q   <= hlen_n;
              flen_q   <= flen_n;
              fld_next <= 1'b1;
            end else begin
              state <= S_IDLE;
            end
          end else begin
            beat_idx <= beat_idx + 1'b1;
          end
        end
        S_DONE: if (!en) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
