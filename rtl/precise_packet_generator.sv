// Precise IPv4/IPv6 packet generator, top level for a card with NUM_IFC
// network interfaces (default 2, as on a 2x10 Gbit/s interface card).
//
// The one-interface generator (pg_core) is repeated once per interface, each
// copy with its own register window, DMA channel pair, network interface,
// DDR2 controller port and the shared timestamp. Every port is an array
// indexed by interface. The platform around it (PCI Express interconnect,
// DMA module, network module, DDR2 controller, timestamp unit) is outside
// this design. How the per-interface copies would share one DDR2 memory is
// not described; here each copy has a port of its own, to be arbitrated or
// partitioned by the memory controller. RNG_MULTI chooses the random source
// of the header-field generators (1 = MLFSR, 0 = single LFSR per 32 bits).
module precise_packet_generator
  import pg_pkg::*;
#(
  parameter int NUM_IFC        = 2,
  parameter int ADDR_W         = MEM_AW,
  parameter int PKT_FIFO_DEPTH = 512,
  parameter int TS_FIFO_DEPTH  = 64,
  parameter int CLK_KHZ        = 156250,
  parameter bit RNG_MULTI      = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [11:0]       mi_addr       [NUM_IFC],
  input  logic [31:0]       mi_dwr        [NUM_IFC],
  input  logic              mi_wr         [NUM_IFC],
  input  logic              mi_rd         [NUM_IFC],
  output logic [31:0]       mi_drd        [NUM_IFC],
  output logic              mi_ardy       [NUM_IFC],
  output logic              mi_drdy       [NUM_IFC],
  input  fl_beat_t          dma_tx        [NUM_IFC],
  input  logic              dma_tx_valid  [NUM_IFC],
  output logic              dma_tx_ready  [NUM_IFC],
  output fl_beat_t          dma_rx        [NUM_IFC],
  output logic              dma_rx_valid  [NUM_IFC],
  input  logic              dma_rx_ready  [NUM_IFC],
  input  fl_beat_t          net_rx        [NUM_IFC],
  input  logic              net_rx_valid  [NUM_IFC],
  output logic              net_rx_ready  [NUM_IFC],
  output fl_beat_t          net_tx        [NUM_IFC],
  output logic              net_tx_valid  [NUM_IFC],
  input  logic              net_tx_ready  [NUM_IFC],
  output logic              mem_cmd_valid [NUM_IFC],
  input  logic              mem_cmd_ready [NUM_IFC],
  output logic              mem_cmd_we    [NUM_IFC],
  output logic [ADDR_W-1:0] mem_cmd_addr  [NUM_IFC],
  output logic [MEM_W-1:0]  mem_cmd_wdata [NUM_IFC],
  input  logic              mem_rd_valid  [NUM_IFC],
  input  logic [MEM_W-1:0]  mem_rd_data   [NUM_IFC],
  input  logic [TS_W-1:0]   ts_now,
  output logic              ts_gen_en
);

  logic [NUM_IFC-1:0] ts_req;

  for (genvar i = 0; i < NUM_IFC; i++) begin : g_ifc
    pg_core #(
      .ADDR_W(ADDR_W), .PKT_FIFO_DEPTH(PKT_FIFO_DEPTH),
      .TS_FIFO_DEPTH(TS_FIFO_DEPTH), .CLK_KHZ(CLK_KHZ), .RNG_MULTI(RNG_MULTI)
    ) u_core (
      .clk, .rst,
      .mi_addr(mi_addr[i]), .mi_dwr(mi_dwr[i]), .mi_wr(mi_wr[i]), .mi_rd(mi_rd[i]),
      .mi_drd(mi_drd[i]), .mi_ardy(mi_ardy[i]), .mi_drdy(mi_drdy[i]),
      .dma_tx(dma_tx[i]), .dma_tx_valid(dma_tx_valid[i]), .dma_tx_ready(dma_tx_ready[i]),
      .dma_rx(dma_rx[i]), .dma_rx_valid(dma_rx_valid[i]), .dma_rx_ready(dma_rx_ready[i]),
      .net_rx(net_rx[i]), .net_rx_valid(net_rx_valid[i]), .net_rx_ready(net_rx_ready[i]),
      .net_tx(net_tx[i]), .net_tx_valid(net_tx_valid[i]), .net_tx_ready(net_tx_ready[i]),
      .mem_cmd_valid(mem_cmd_valid[i]), .mem_cmd_ready(mem_cmd_ready[i]),
      .mem_cmd_we(mem_cmd_we[i]), .mem_cmd_addr(mem_cmd_addr[i]),
      .mem_cmd_wdata(mem_cmd_wdata[i]),
      .mem_rd_valid(mem_rd_valid[i]), .mem_rd_data(mem_rd_data[i]),
      .ts_now, .ts_gen_en(ts_req[i])
    );
  end

  assign ts_gen_en = |ts_req;

endmodule
