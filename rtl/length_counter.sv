// Length counter: counts the bytes of each packet on its way to the network.
//
// It sits in the transmit stream and passes it on unchanged (no latency).
// Every accepted beat adds 8 bytes, the eof beat adds rem+1; at eof the total
// is presented on len with len_valid high for one clock (in the clock after
// the eof beat). in_pkt is high from the sof beat to the eof beat inclusive.
module length_counter
  import pg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  fl_beat_t    in,
  input  logic        in_valid,
  output logic        in_ready,
  output fl_beat_t    out,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        in_pkt,
  output logic [15:0] len,
  output logic        len_valid
);

  logic [15:0] acc;
  logic        busy;
  logic        fire;

  assign out       = in;
  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign fire      = in_valid & out_ready;
  assign in_pkt    = busy | (in_valid & in.sof);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      busy      <= 1'b0;
      len       <= '0;
      len_valid <= 1'b0;
    end else begin
      len_valid <= 1'b0;
      if (fire) begin
        if (in.eof) begin
          len       <= (in.sof ? 16'd0 : acc) + 16'(in.rem) + 16'd1;
          len_valid <= 1'b1;
          acc       <= '0;
          busy      <= 1'b0;
        end else begin
          acc  <= (in.sof ? 16'd0 : acc) + 16'd8;
          busy <= 1'b1;
        end
      end
    end
  end

endmodule
