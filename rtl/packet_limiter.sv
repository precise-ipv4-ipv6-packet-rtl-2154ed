// Packet limiter: plans and controls when each packet goes to the network.
//
// Datapath: timestamp extractor -> timestamp FIFO and packet FIFO ->
// release gate -> length counter -> network. Two limitations can be enabled
// independently and both must agree before a packet starts:
//   ts_en   - the packet at the head of the packet FIFO waits until the
//             current time (now, from the timestamp unit) reaches the
//             timestamp extracted from it (timestamp comparator);
//   rate_en - the limiting algorithm delays the start of a packet so that the
//             average rate equals the set rate, using the length the length
//             counter measured for the previous packet.
// With neither enabled, packets pass at full speed. A packet that has started
// is never paused by the gate, only by out_ready.
//
// Interface: FrameLink in (in/in_valid/in_ready) and out; empty is high when
// no beat or timestamp is held. Latency with no limitation: a beat leaves the
// clock after it was written into the packet FIFO. An assertion checks that
// an output beat that is not accepted is held unchanged. FIFO depths are
// parameters: the generator leaves them to the user; the defaults here are
// this design's choice. The FIFOs' fill counts are not needed and their
// count outputs are left open (lint notes the empty pin connections).
module packet_limiter
  import pg_pkg::*;
#(
  parameter int PKT_FIFO_DEPTH = 512,
  parameter int TS_FIFO_DEPTH  = 64,
  parameter int CLK_KHZ        = 156250
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ts_en,
  input  logic            rate_en,
  input  logic            rate_abs,
  input  logic [31:0]     rate,
  input  logic [TS_W-1:0] now,
  input  fl_beat_t        in,
  input  logic            in_valid,
  output logic            in_ready,
  output fl_beat_t        out,
  output logic            out_valid,
  input  logic            out_ready,
  output logic            empty,
  output logic [15:0]     last_len
);

  // ------------------------------------------------------------ extractor
  logic [TS_W-1:0] ex_ts;
  logic            ex_ts_valid, ex_ts_ready;
  fl_beat_t        ex_out;
  logic            ex_out_valid, ex_out_ready;

  timestamp_extractor u_ext (
    .clk, .rst, .ts_en,
    .in, .in_valid, .in_ready,
    .ts_data(ex_ts), .ts_valid(ex_ts_valid), .ts_ready(ex_ts_ready),
    .out(ex_out), .out_valid(ex_out_valid), .out_ready(ex_out_ready)
  );

  // ------------------------------------------------------------ FIFOs
  logic            ts_full, ts_empty, ts_pop;
  logic [TS_W-1:0] ts_head;
  logic            pf_full, pf_empty, pf_pop;
  fl_beat_t        pf_head;

  assign ex_ts_ready  = ~ts_full;
  assign ex_out_ready = ~pf_full;

  sync_fifo #(.WIDTH(TS_W), .DEPTH(TS_FIFO_DEPTH)) u_ts_fifo (
    .clk, .rst,
    .push(ex_ts_valid & ~ts_full), .wr_data(ex_ts), .full(ts_full),
    .pop(ts_pop), .rd_data(ts_head), .empty(ts_empty), .count()
  );

  sync_fifo #(.WIDTH(FL_BEAT_W), .DEPTH(PKT_FIFO_DEPTH)) u_pkt_fifo (
    .clk, .rst,
    .push(ex_out_valid & ~pf_full), .wr_data(ex_out), .full(pf_full),
    .pop(pf_pop), .rd_data(pf_head), .empty(pf_empty), .count()
  );

  // ------------------------------------------------------------ release gate
  logic ts_go, rate_ok, in_pkt, started, start_ok;
  logic lc_in_valid, lc_in_ready;
  logic [15:0] len;
  logic        len_valid;

  timestamp_comparator u_cmp (
    .clk, .rst, .now, .ts_head, .ts_valid(~ts_empty), .ts_pop, .go(ts_go)
  );

  limiting_algorithm #(.CLK_KHZ(CLK_KHZ)) u_lim (
    .clk, .rst, .rate_abs, .rate, .in_pkt, .len, .len_valid, .allow(rate_ok)
  );

  // started: the head packet has been released and is leaving
  assign start_ok    = (!ts_en || ts_go) && (!rate_en || rate_ok);
  assign lc_in_valid = ~pf_empty & (started | (pf_head.sof & start_ok)
                                    | (~pf_head.sof & ~started));
  assign pf_pop      = lc_in_valid & lc_in_ready;
  assign ts_pop      = ts_en & pf_pop & pf_head.sof & ~ts_empty;

  always_ff @(posedge clk) begin
    if (rst)         started <= 1'b0;
    else if (pf_pop) started <= ~pf_head.eof;
  end

  length_counter u_len (
    .clk, .rst,
    .in(pf_head), .in_valid(lc_in_valid), .in_ready(lc_in_ready),
    .out, .out_valid, .out_ready,
    .in_pkt, .len, .len_valid
  );

  always_ff @(posedge clk) begin
    if (rst)            last_len <= '0;
    else if (len_valid) last_len <= len;
  end

  assign empty = pf_empty & ts_empty & ~in_valid;

  // Output handshake: a beat offered and not taken stays offered, unchanged.
  a_out_hold: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(out));

endmodule
