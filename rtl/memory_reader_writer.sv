// Memory reader/writer: joins the DMA module, the network module and the
// DDR2 controller, and feeds the packet limiter.
//
// It is the switching logic (mode-dependent routing of the full-duplex
// FrameLink interfaces) in front of the FrameLink-DDR2 transformer (stream
// to memory words and back). Storing comes from the host (MODE_LOAD_HOST) or
// straight from the network (MODE_LOAD_NET); replay (MODE_REPLAY) reads the
// stored traffic towards the packet limiter; otherwise host traffic goes to
// the limiter as in a plain network card. wr_start/rd_start come from the main
// control FSM. No latency of its own beyond the transformer's.
module memory_reader_writer
  import pg_pkg::*;
#(
  parameter int ADDR_W   = MEM_AW,
  parameter int RD_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  pg_mode_e          mode,
  input  logic              wr_start,
  input  logic              rd_start,
  output logic [ADDR_W:0]   words_stored,
  output logic              mem_full,
  output logic              rd_busy,
  // DMA module
  input  fl_beat_t          dma_tx,
  input  logic              dma_tx_valid,
  output logic              dma_tx_ready,
  output fl_beat_t          dma_rx,
  output logic              dma_rx_valid,
  input  logic              dma_rx_ready,
  // network module, receive
  input  fl_beat_t          net_rx,
  input  logic              net_rx_valid,
  output logic              net_rx_ready,
  // to the packet limiter
  output fl_beat_t          lim,
  output logic              lim_valid,
  input  logic              lim_ready,
  // DDR2 controller
  output logic              cmd_valid,
  input  logic              cmd_ready,
  output logic              cmd_we,
  output logic [ADDR_W-1:0] cmd_addr,
  output logic [MEM_W-1:0]  cmd_wdata,
  input  logic              rd_valid,
  input  logic [MEM_W-1:0]  rd_data
);

  fl_beat_t mem_wr, mem_rd;
  logic     mem_wr_valid, mem_wr_ready, mem_rd_valid, mem_rd_ready;

  switching_logic u_sw (
    .mode,
    .dma_tx, .dma_tx_valid, .dma_tx_ready,
    .dma_rx, .dma_rx_valid, .dma_rx_ready,
    .net_rx, .net_rx_valid, .net_rx_ready,
    .lim, .lim_valid, .lim_ready,
    .mem_wr, .mem_wr_valid, .mem_wr_ready,
    .mem_rd, .mem_rd_valid, .mem_rd_ready
  );

  fl_ddr2_transformer #(.ADDR_W(ADDR_W), .RD_DEPTH(RD_DEPTH)) u_xf (
    .clk, .rst,
    .wr_start, .in(mem_wr), .in_valid(mem_wr_valid), .in_ready(mem_wr_ready),
    .words_stored, .mem_full,
    .rd_start, .out(mem_rd), .out_valid(mem_rd_valid), .out_ready(mem_rd_ready),
    .rd_busy,
    .cmd_valid, .cmd_ready, .cmd_we, .cmd_addr, .cmd_wdata, .rd_valid, .rd_data
  );

endmodule
