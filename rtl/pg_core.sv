// Precise packet generator for one network interface.
//
// Wires the generator's blocks together: the register file (configuration
// from the host over the MI32 bus), the pseudo-random generator and the
// packet completer (synthetic IPv4/IPv6 frames), the memory reader/writer
// (routing between DMA module, network module and DDR2 controller), the
// packet limiter (timestamp- and rate-based transmission control) and the
// main control FSM that sets all of them up per mode. The limiter takes its
// input from the completer in generation mode and from the memory
// reader/writer otherwise (host traffic in NIC mode, stored traffic in
// replay). Frames from the limiter go to the network module (net_tx).
// All interfaces are 64-bit FrameLink beats with valid/ready, one clock
// domain (156.25 MHz in the target system). now is the 64-bit time of the
// platform's timestamp unit; ts_gen_en asks that unit to run. RNG_MULTI
// picks the header fields' random source (1 = MLFSR, 0 = single LFSR).
//
// The completer's own frame count (gen_sent) and the limiter's last frame
// length (last_len) are left unread here: the SENT register counts frames
// at the network side instead, which also covers NIC and replay traffic.
// Lint reports the two as unused signals; they are kept so a register can
// be added for them without touching the blocks.
module pg_core
  import pg_pkg::*;
#(
  parameter int ADDR_W         = MEM_AW,
  parameter int PKT_FIFO_DEPTH = 512,
  parameter int TS_FIFO_DEPTH  = 64,
  parameter int CLK_KHZ        = 156250,
  parameter bit RNG_MULTI      = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  // MI32 bus
  input  logic [11:0]       mi_addr,
  input  logic [31:0]       mi_dwr,
  input  logic              mi_wr,
  input  logic              mi_rd,
  output logic [31:0]       mi_drd,
  output logic              mi_ardy,
  output logic              mi_drdy,
  // DMA module
  input  fl_beat_t          dma_tx,
  input  logic              dma_tx_valid,
  output logic              dma_tx_ready,
  output fl_beat_t          dma_rx,
  output logic              dma_rx_valid,
  input  logic              dma_rx_ready,
  // network module
  input  fl_beat_t          net_rx,
  input  logic              net_rx_valid,
  output logic              net_rx_ready,
  output fl_beat_t          net_tx,
  output logic              net_tx_valid,
  input  logic              net_tx_ready,
  // DDR2 controller
  output logic              mem_cmd_valid,
  input  logic              mem_cmd_ready,
  output logic              mem_cmd_we,
  output logic [ADDR_W-1:0] mem_cmd_addr,
  output logic [MEM_W-1:0]  mem_cmd_wdata,
  input  logic              mem_rd_valid,
  input  logic [MEM_W-1:0]  mem_rd_data,
  // timestamp unit
  input  logic [TS_W-1:0]   ts_now,
  output logic              ts_gen_en
);

  pg_cfg_t    cfg;
  field_cfg_t fcfg [NUM_FIELDS];
  field_val_t fvals [NUM_FIELDS];
  logic       start, stop, busy;
  logic [2:0] state_code;
  logic [31:0] sent;
  logic [ADDR_W:0] words_stored;

  register_file u_regs (
    .clk, .rst,
    .mi_addr, .mi_dwr, .mi_wr, .mi_rd, .mi_drd, .mi_ardy, .mi_drdy,
    .cfg, .fcfg, .start, .stop,
    .busy, .state(state_code), .sent, .mem_words(32'(words_stored))
  );

  // ------------------------------------------------------------ control
  pg_mode_e route;
  logic gen_en, gen_done, lim_ts_en, lim_rate_en, wr_start, rd_start;
  logic mem_full, rd_busy, lim_empty, gen_idle;

  main_control_fsm u_fsm (
    .clk, .rst, .start, .stop,
    .req_mode(cfg.mode), .ts_present(cfg.ts_present), .rate_req(cfg.rate_en),
    .gen_done, .gen_idle, .mem_full, .rd_busy, .lim_empty,
    .route, .gen_en, .lim_ts_en, .lim_rate_en, .ts_gen_en,
    .wr_start, .rd_start, .busy, .state_code
  );

  // ------------------------------------------------------------ generation
  logic     fld_restart, fld_next;
  fl_beat_t gen_beat;
  logic     gen_valid, gen_ready;
  logic [31:0] gen_sent;

  pseudorandom_generator #(.RNG_MULTI(RNG_MULTI)) u_prg (
    .clk, .rst, .cfg(fcfg), .restart(fld_restart), .next(fld_next), .values(fvals)
  );

  packet_completer u_comp (
    .clk, .rst, .en(gen_en),
    .ipv6(cfg.ipv6), .payload_random(cfg.payload_random), .pattern(cfg.pattern),
    .dst_mac(cfg.dst_mac), .src_mac(cfg.src_mac), .pkt_count(cfg.pkt_count),
    .values(fvals), .fld_restart, .fld_next,
    .tx(gen_beat), .tx_valid(gen_valid), .tx_ready(gen_ready),
    .done(gen_done), .sent(gen_sent)
  );

  // the completer is idle once it no longer has a frame in progress
  assign gen_idle = ~gen_valid;

  // ------------------------------------------------------------ memory side
  fl_beat_t mrw_beat;
  logic     mrw_valid, mrw_ready;

  memory_reader_writer #(.ADDR_W(ADDR_W)) u_mrw (
    .clk, .rst, .mode(route), .wr_start, .rd_start,
    .words_stored, .mem_full, .rd_busy,
    .dma_tx, .dma_tx_valid, .dma_tx_ready,
    .dma_rx, .dma_rx_valid, .dma_rx_ready,
    .net_rx, .net_rx_valid, .net_rx_ready,
    .lim(mrw_beat), .lim_valid(mrw_valid), .lim_ready(mrw_ready),
    .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_we(mem_cmd_we),
    .cmd_addr(mem_cmd_addr), .cmd_wdata(mem_cmd_wdata),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data)
  );

  // ------------------------------------------------------------ limiter
  fl_beat_t lim_in;
  logic     lim_in_valid, lim_in_ready;
  logic [15:0] last_len;

  always_comb begin
    if (route == MODE_GEN) begin
      lim_in       = gen_beat;
      lim_in_valid = gen_valid;
    end else begin
      lim_in       = mrw_beat;
      lim_in_valid = mrw_valid;
    end
    gen_ready = (route == MODE_GEN) & lim_in_ready;
    mrw_ready = (route != MODE_GEN) & lim_in_ready;
  end

  packet_limiter #(
    .PKT_FIFO_DEPTH(PKT_FIFO_DEPTH), .TS_FIFO_DEPTH(TS_FIFO_DEPTH), .CLK_KHZ(CLK_KHZ)
  ) u_lim (
    .clk, .rst,
    .ts_en(lim_ts_en), .rate_en(lim_rate_en), .rate_abs(cfg.rate_abs), .rate(cfg.rate),
    .now(ts_now),
    .in(lim_in), .in_valid(lim_in_valid), .in_ready(lim_in_ready),
    .out(net_tx), .out_valid(net_tx_valid), .out_ready(net_tx_ready),
    .empty(lim_empty), .last_len
  );

  // packets handed to the network module
  always_ff @(posedge clk) begin
    if (rst)                                             sent <= '0;
    else if (start && !busy)                             sent <= '0;
    else if (net_tx_valid && net_tx_ready && net_tx.eof) sent <= sent + 1'b1;
  end

endmodule
