// Shared types and constants of the precise IPv4/IPv6 packet generator.
//
// FrameLink beat: the 64-bit on-chip frame stream that connects the generator
// to the DMA and Network modules (64 bits at 156.25 MHz). Here it is a packed
// struct carried with separate valid/ready wires (active high). Byte 0 of a
// frame is data[7:0]; rem is the index of the last valid byte in an eof beat.
//
// Also defined here: the modes of operation, the header fields that have a
// field generator, the control/status register map and the DDR2 word format.
package pg_pkg;

  localparam int FL_DW = 64;                 // FrameLink data width (bits)
  localparam int TS_W  = 64;                 // timestamp width (bits)

  typedef struct packed {
    logic [FL_DW-1:0] data;
    logic [2:0]       rem;                   // last valid byte index in eof beat
    logic             sof;
    logic             eof;
  } fl_beat_t;

  localparam int FL_BEAT_W = $bits(fl_beat_t);

  // Modes of operation (main control FSM)
  typedef enum logic [2:0] {
    MODE_NIC       = 3'd0,                   // standard network interface card
    MODE_GEN       = 3'd1,                   // synthetic traffic generation
    MODE_LOAD_HOST = 3'd2,                   // DMA (PCAP from host) -> DDR2
    MODE_LOAD_NET  = 3'd3,                   // network interface -> DDR2
    MODE_REPLAY    = 3'd4                    // DDR2 -> packet limiter -> network
  } pg_mode_e;

  // How a header field is produced
  typedef enum logic [1:0] {
    FM_CONST  = 2'd0,                        // value of register "from"
    FM_SEQ    = 2'd1,                        // from, from+inc, ... restart after "to"
    FM_RANDOM = 2'd2                         // random, normalised to [from, to]
  } field_mode_e;

  // Generated fields. IPv4 and IPv6 share a field where the two headers have
  // the same meaning (TOS/traffic class, TTL/hop limit, protocol/next header,
  // addresses: IPv4 uses the low 32 bits).
  localparam int NUM_FIELDS = 9;
  localparam int F_LEN   = 0;                // IP payload length in bytes
  localparam int F_TC    = 1;                // IPv4 TOS / IPv6 traffic class
  localparam int F_ID    = 2;                // IPv4 identification
  localparam int F_FRAG  = 3;                // IPv4 flags + fragment offset
  localparam int F_FLOW  = 4;                // IPv6 flow label
  localparam int F_TTL   = 5;                // IPv4 TTL / IPv6 hop limit
  localparam int F_PROTO = 6;                // IPv4 protocol / IPv6 next header
  localparam int F_SRC   = 7;                // source address
  localparam int F_DST   = 8;                // destination address

  localparam int FIELD_MAX_W = 128;

  function automatic int field_width(int f);
    case (f)
      F_LEN:   return 16;
      F_TC:    return 8;
      F_ID:    return 16;
      F_FRAG:  return 16;
      F_FLOW:  return 20;
      F_TTL:   return 8;
      F_PROTO: return 8;
      default: return 128;                   // F_SRC, F_DST
    endcase
  endfunction

  typedef logic [FIELD_MAX_W-1:0] field_val_t;

  typedef struct packed {
    field_mode_e mode;
    field_val_t  from;
    field_val_t  to;
    field_val_t  inc;
  } field_cfg_t;

  // Configuration handed from the register file to the datapath
  typedef struct packed {
    pg_mode_e    mode;
    logic        ipv6;                       // 1: IPv6 headers, 0: IPv4
    logic        ts_present;                 // stored traffic carries timestamps
    logic        rate_en;                    // rate limitation requested
    logic        rate_abs;                   // 1: rate in Mbit/s, 0: fraction of line
    logic        payload_random;             // 1: random payload, 0: pattern
    logic [31:0] rate;                       // rate value (see rate_abs)
    logic [31:0] pkt_count;                  // packets to generate/store, 0 = no limit
    logic [31:0] pattern;                    // payload pattern, repeated
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
  } pg_cfg_t;

  // Register map (byte addresses of 32-bit registers on the MI32 bus)
  localparam logic [11:0] REG_CONTROL  = 12'h000; // [0] start, [1] stop (write-1 pulses)
                                                  // [6:4] mode, [8] ipv6, [9] ts_present
                                                  // [10] rate_en, [11] rate_abs
                                                  // [12] payload_random
  localparam logic [11:0] REG_STATUS   = 12'h004; // [0] busy, [3:1] FSM state
  localparam logic [11:0] REG_PKTCNT   = 12'h008;
  localparam logic [11:0] REG_RATE     = 12'h00C;
  localparam logic [11:0] REG_PATTERN  = 12'h010;
  localparam logic [11:0] REG_DMAC_LO  = 12'h014;
  localparam logic [11:0] REG_DMAC_HI  = 12'h018;
  localparam logic [11:0] REG_SMAC_LO  = 12'h01C;
  localparam logic [11:0] REG_SMAC_HI  = 12'h020;
  localparam logic [11:0] REG_SENT     = 12'h024; // packets sent to the network (RO)
  localparam logic [11:0] REG_MEMWORDS = 12'h028; // words stored in DDR2 (RO)
  localparam logic [11:0] REG_FMODES   = 12'h02C; // 2 bits per field, field f at [2f+1:2f]
  localparam logic [11:0] REG_FIELD0   = 12'h100; // field f at 0x100 + 0x40*f:
                                                  // +0x00..0x0C from, +0x10..0x1C to,
                                                  // +0x20..0x2C increment_size (LSW first)

  // DDR2 controller word: one FrameLink beat per word
  localparam int MEM_W  = 128;
  localparam int MEM_AW = 27;                // 2 GB / 16 B

  function automatic logic [MEM_W-1:0] beat_to_word(fl_beat_t b);
    return {{(MEM_W-FL_BEAT_W){1'b0}}, b};
  endfunction

  function automatic fl_beat_t word_to_beat(logic [MEM_W-1:0] w);
    return fl_beat_t'(w[FL_BEAT_W-1:0]);
  endfunction

endpackage
