// Register control and status file of the packet generator.
//
// 32-bit registers on an MI32-style bus from the PCI Express interconnect
// (mi_addr byte address, mi_dwr, mi_wr, mi_rd; read data mi_drd with mi_drdy
// one clock after mi_rd; mi_ardy always high). The map is in pg_pkg: the
// control word (mode, IP version, timestamp presence, rate limitation and its
// encoding, payload type, start/stop pulses), packet count, rate, payload
// pattern, MAC addresses, the per-field modes, and for every generated field
// its from, to and increment_size values (up to 128 bits, four words each,
// least significant word first; bits beyond the field's width read as 0).
// Status registers report busy, the FSM state, sent packets and stored
// memory words. That the file holds from/to/increment_size per field, the
// constant-or-generated choice, the IP version, the mode and the rate setting
// follows the generator's description; addresses and bit positions are this
// design's choice.
module register_file
  import pg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] mi_addr,
  input  logic [31:0] mi_dwr,
  input  logic        mi_wr,
  input  logic        mi_rd,
  output logic [31:0] mi_drd,
  output logic        mi_ardy,
  output logic        mi_drdy,
  // configuration
  output pg_cfg_t     cfg,
  output field_cfg_t  fcfg [NUM_FIELDS],
  output logic        start,
  output logic        stop,
  // status
  input  logic        busy,
  input  logic [2:0]  state,
  input  logic [31:0] sent,
  input  logic [31:0] mem_words
);

  field_val_t from_q [NUM_FIELDS];
  field_val_t to_q   [NUM_FIELDS];
  field_val_t inc_q  [NUM_FIELDS];
  logic [2*NUM_FIELDS-1:0] fmodes_q;

  function automatic field_val_t fmask(int f);
    return field_val_t'({FIELD_MAX_W{1'b1}} >> (FIELD_MAX_W - field_width(f)));
  endfunction

  logic       is_field;
  logic [3:0] fidx;
  logic [1:0] fsel, fword;

  assign is_field = mi_addr >= REG_FIELD0;
  assign fidx     = 4'((mi_addr - REG_FIELD0) >> 6);
  assign fsel     = mi_addr[5:4];
  assign fword    = mi_addr[3:2];
  assign mi_ardy  = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg      <= '0;
      cfg.rate <= 32'd65536;
      fmodes_q <= '0;
      start    <= 1'b0;
      stop     <= 1'b0;
      for (int f = 0; f < NUM_FIELDS; f++) begin
        from_q[f] <= '0;
        to_q[f]   <= '0;
        inc_q[f]  <= '0;
      end
    end else begin
      start <= 1'b0;
      stop  <= 1'b0;
      if (mi_wr) begin
        if (is_field) begin
          for (int f = 0; f < NUM_FIELDS; f++) begin
            if (fidx == 4'(f)) begin
              case (fsel)
                2'd0: from_q[f][32*fword +: 32] <= mi_dwr;
                2'd1: to_q[f][32*fword +: 32]   <= mi_dwr;
                2'd2: inc_q[f][32*fword +: 32]  <= mi_dwr;
                default: ;
              endcase
            end
          end
        end else begin
          case (mi_addr)
            REG_CONTROL: begin
              start              <= mi_dwr[0];
              stop               <= mi_dwr[1];
              cfg.mode           <= pg_mode_e'(mi_dwr[6:4]);
              cfg.ipv6           <= mi_dwr[8];
              cfg.ts_present     <= mi_dwr[9];
              cfg.rate_en        <= mi_dwr[10];
              cfg.rate_abs       <= mi_dwr[11];
              cfg.payload_random <= mi_dwr[12];
            end
            REG_PKTCNT:  cfg.pkt_count     <= mi_dwr;
            REG_RATE:    cfg.rate          <= mi_dwr;
            REG_PATTERN: cfg.pattern       <= mi_dwr;
            REG_DMAC_LO: cfg.dst_mac[31:0]  <= mi_dwr;
            REG_DMAC_HI: cfg.dst_mac[47:32] <= mi_dwr[15:0];
            REG_SMAC_LO: cfg.src_mac[31:0]  <= mi_dwr;
            REG_SMAC_HI: cfg.src_mac[47:32] <= mi_dwr[15:0];
            REG_FMODES:  fmodes_q           <= mi_dwr[2*NUM_FIELDS-1:0];
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    for (int f = 0; f < NUM_FIELDS; f++) begin
      fcfg[f].mode = field_mode_e'(fmodes_q[2*f +: 2]);
      fcfg[f].from = from_q[f] & fmask(f);
      fcfg[f].to   = to_q[f]   & fmask(f);
      fcfg[f].inc  = inc_q[f]  & fmask(f);
    end
  end

  // read port
  logic [31:0] rd_word;
  always_comb begin
    rd_word = '0;
    if (is_field) begin
      for (int f = 0; f < NUM_FIELDS; f++) begin
        if (fidx == 4'(f)) begin
          case (fsel)
            2'd0: rd_word = fcfg[f].from[32*fword +: 32];
            2'd1: rd_word = fcfg[f].to[32*fword +: 32];
            2'd2: rd_word = fcfg[f].inc[32*fword +: 32];
            default: ;
          endcase
        end
      end
    end else begin
      case (mi_addr)
        REG_CONTROL:  rd_word = {19'd0, cfg.payload_random, cfg.rate_abs, cfg.rate_en,
                                 cfg.ts_present, cfg.ipv6, 1'b0, cfg.mode, 4'd0};
        REG_STATUS:   rd_word = {28'd0, state, busy};
        REG_PKTCNT:   rd_word = cfg.pkt_count;
        REG_RATE:     rd_word = cfg.rate;
        REG_PATTERN:  rd_word = cfg.pattern;
        REG_DMAC_LO:  rd_word = cfg.dst_mac[31:0];
        REG_DMAC_HI:  rd_word = {16'd0, cfg.dst_mac[47:32]};
        REG_SMAC_LO:  rd_word = cfg.src_mac[31:0];
        REG_SMAC_HI:  rd_word = {16'd0, cfg.src_mac[47:32]};
        REG_SENT:     rd_word = sent;
        REG_MEMWORDS: rd_word = mem_words;
        REG_FMODES:   rd_word = 32'(fmodes_q);
        default:      rd_word = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mi_drd  <= '0;
      mi_drdy <= 1'b0;
    end else begin
      mi_drdy <= mi_rd;
      if (mi_rd) mi_drd <= rd_word;
    end
  end

endmodule
