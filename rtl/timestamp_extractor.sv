// Timestamp extractor: splits timestamps off the packets entering the packet
// limiter.
//
// With ts_en high every frame is expected to start with one 64-bit beat
// holding its transmit timestamp, followed by the packet itself. That beat is
// handed to the timestamp FIFO (ts_data/ts_valid/ts_ready) and dropped from
// the stream; the following beat is marked as start of frame and everything
// up to eof goes to the packet FIFO (out/out_valid/out_ready). A frame made of
// the timestamp beat only is dropped whole. With ts_en low the stream passes
// unchanged. Combinational, no added latency. That each stored packet carries
// a timestamp comes from the generator's description; the placement as a
// leading 64-bit word is this design's choice.
module timestamp_extractor
  import pg_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ts_en,
  input  fl_beat_t        in,
  input  logic            in_valid,
  output logic            in_ready,
  output logic [TS_W-1:0] ts_data,
  output logic            ts_valid,
  input  logic            ts_ready,
  output fl_beat_t        out,
  output logic            out_valid,
  input  logic            out_ready
);

  logic mark_sof;                            // next data beat starts the packet
  logic is_ts;

  assign is_ts    = ts_en & in.sof;
  assign ts_data  = in.data;
  assign ts_valid = in_valid & is_ts;

  always_comb begin
    out       = in;
    out.sof   = ts_en ? mark_sof : in.sof;
    out_valid = in_valid & ~is_ts;
    in_ready  = is_ts ? ts_ready : out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mark_sof <= 1'b0;
    end else if (in_valid && in_ready) begin
      if (is_ts)       mark_sof <= ~in.eof;
      else if (out.sof) mark_sof <= 1'b0;
    end
  end

endmodule
