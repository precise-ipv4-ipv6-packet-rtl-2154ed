// Synchronous FIFO (single clock), used as the timestamp FIFO and the packet
// FIFO of the packet limiter and as the read buffer of the FrameLink-DDR2
// transformer.
//
// Storage is an array of DEPTH words (DEPTH a power of two), written on
// push when not full and read on pop when not empty. The head word is shown
// on rd_data without a read latency (first-word fall-through). count gives
// the number of stored words. A push into a full FIFO or a pop from an empty
// one is ignored; assertions flag both.
module sync_fifo #(
  parameter int WIDTH = 72,
  parameter int DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  assign count = wptr - rptr;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push && !full) wptr <= wptr + 1'b1;
      if (pop && !empty) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop  |-> !empty);

endmodule
