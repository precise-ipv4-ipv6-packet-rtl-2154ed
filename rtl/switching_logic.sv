// Switching logic of the memory reader/writer: connects the full-duplex data
// interfaces as the mode of operation requires.
//
//   mode            DMA TX (host->card)   network RX          memory read
//   MODE_NIC        -> packet limiter     -> DMA RX           unused
//   MODE_GEN        held (not ready)      -> DMA RX           unused
//   MODE_LOAD_HOST  -> memory write       -> DMA RX           unused
//   MODE_LOAD_NET   held (not ready)      -> memory write     unused
//   MODE_REPLAY     held (not ready)      -> DMA RX           -> packet limiter
//
// The five paths are the ones of the memory reader/writer's description; that
// received traffic keeps going to the host in every mode but network loading
// is this design's choice. Purely combinational; mode must only change
// between frames (the main control FSM changes it when the streams are idle).
module switching_logic
  import pg_pkg::*;
(
  input  pg_mode_e mode,
  // DMA module, host -> card
  input  fl_beat_t dma_tx,
  input  logic     dma_tx_valid,
  output logic     dma_tx_ready,
  // DMA module, card -> host
  output fl_beat_t dma_rx,
  output logic     dma_rx_valid,
  input  logic     dma_rx_ready,
  // network module, received frames
  input  fl_beat_t net_rx,
  input  logic     net_rx_valid,
  output logic     net_rx_ready,
  // towards the packet limiter
  output fl_beat_t lim,
  output logic     lim_valid,
  input  logic     lim_ready,
  // FrameLink-DDR2 transformer, write side
  output fl_beat_t mem_wr,
  output logic     mem_wr_valid,
  input  logic     mem_wr_ready,
  // FrameLink-DDR2 transformer, read side
  input  fl_beat_t mem_rd,
  input  logic     mem_rd_valid,
  output logic     mem_rd_ready
);

  always_comb begin
    dma_tx_ready = 1'b0;
    dma_rx       = net_rx;
    dma_rx_valid = 1'b0;
    net_rx_ready = 1'b0;
    lim          = dma_tx;
    lim_valid    = 1'b0;
    mem_wr       = dma_tx;
    mem_wr_valid = 1'b0;
    mem_rd_ready = 1'b0;

    if (mode == MODE_LOAD_NET) begin
      mem_wr       = net_rx;
      mem_wr_valid = net_rx_valid;
      net_rx_ready = mem_wr_ready;
    end else begin
      dma_rx_valid = net_rx_valid;
      net_rx_ready = dma_rx_ready;
    end

    case (mode)
      MODE_NIC: begin
        lim_valid    = dma_tx_valid;
        dma_tx_ready = lim_ready;
      end
      MODE_LOAD_HOST: begin
        mem_wr_valid = dma_tx_valid;
        dma_tx_ready = mem_wr_ready;
      end
      MODE_REPLAY: begin
        lim          = mem_rd;
        lim_valid    = mem_rd_valid;
        mem_rd_ready = lim_ready;
      end
      default: ;
    endcase
  end

endmodule
