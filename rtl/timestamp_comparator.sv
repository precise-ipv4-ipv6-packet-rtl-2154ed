// Timestamp comparator: releases the packet at the head of the packet FIFO
// once the current time has reached the timestamp recorded for it.
//
// now is the 64-bit time from the timestamp unit, ts_head the head of the
// timestamp FIFO and ts_valid its non-empty flag. go is registered: it rises
// the clock after now >= ts_head holds, so a packet leaves at most one clock
// after its time has come. Releasing on "now has reached or passed" rather
// than on exact equality is this design's choice, so that a timestamp already
// in the past does not block the stream.
module timestamp_comparator
  import pg_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [TS_W-1:0] now,
  input  logic [TS_W-1:0] ts_head,
  input  logic            ts_valid,
  input  logic            ts_pop,
  output logic            go
);

  always_ff @(posedge clk) begin
    if (rst || ts_pop) go <= 1'b0;
    else               go <= ts_valid && (now >= ts_head);
  end

endmodule
