// Behavioural model of a DDR2 memory controller with its memory, for
// simulation only. Commands are accepted on cmd_valid & cmd_ready (cmd_ready
// is pseudo-random when STALL is set); a read returns its word on
// rd_valid/rd_data LATENCY clocks later, in order. The memory is a sparse
// associative array, so any address width can be modelled; unwritten words
// read as zero.
module ddr2_model #(
  parameter int ADDR_W  = 27,
  parameter int DATA_W  = 128,
  parameter int LATENCY = 12,
  parameter bit STALL   = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_we,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [DATA_W-1:0] cmd_wdata,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data
);
  logic [DATA_W-1:0] mem [longint];
  logic              pipe_v [LATENCY];
  logic [DATA_W-1:0] pipe_d [LATENCY];
  int writes = 0, reads = 0;

  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LATENCY; i++) pipe_v[i] <= 1'b0;
      cmd_ready <= 1'b0;
    end else begin
      cmd_ready <= STALL ? ($urandom % 5 != 0) : 1'b1;
      for (int i = 1; i < LATENCY; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
      pipe_v[0] <= 1'b0;
      if (cmd_valid && cmd_ready) begin
        if (cmd_we) begin
          mem[longint'(cmd_addr)] = cmd_wdata;
          writes++;
        end else begin
          pipe_v[0] <= 1'b1;
          pipe_d[0] <= mem.exists(longint'(cmd_addr)) ? mem[longint'(cmd_addr)] : '0;
          reads++;
        end
      end
    end
  end
  assign rd_valid = pipe_v[LATENCY-1];
  assign rd_data  = pipe_d[LATENCY-1];
endmodule
