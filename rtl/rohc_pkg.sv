// rohc_pkg: types and constants shared by the RoHC compressor blocks.
//
// Holds the profile and mode encodings, the field kinds used by the LSB
// encoder, the change-flag record, the 38-entry packet capability table of
// the compressed packet types (bit 0 is the most compact packet, bit 37 the
// largest), and the per-user context record that the compressor fetches from
// and writes back to external memory.
//
// The capability numbers (SN, IP-ID, TS bits, context update, CRC type) are
// the ones of the RFC 3095 packet set for profile 1. The context record keeps
// the sections of the profile-1 context (reference header, IP-ID pattern,
// RTP pattern, mode, timeout counters, sliding windows) but as a packed
// struct moved in one beat, not as 81 separate 32-bit words.
//
// Source: the capability table follows the packet table of the reference
// design (most compact first), the flag set its context-change controller and
// the context its memory map (in content, not layout).
package rohc_pkg;

  // ---------------------------------------------------------------- basics
  typedef enum logic [1:0] {
    PROFILE_0 = 2'd0,   // uncompressed
    PROFILE_1 = 2'd1,   // RTP/UDP/IP
    PROFILE_2 = 2'd2    // UDP/IP
  } profile_t;

  typedef enum logic [1:0] {
    MODE_U = 2'd0,      // unidirectional
    MODE_O = 2'd1,      // bidirectional optimistic
    MODE_R = 2'd2       // bidirectional reliable
  } mode_t;

  typedef enum logic [1:0] {
    FIELD_SN   = 2'd0,
    FIELD_IPID = 2'd1,
    FIELD_TS   = 2'd2
  } field_t;

  typedef enum logic [1:0] {
    CRC_NONE = 2'd0,
    CRC_3    = 2'd1,
    CRC_7    = 2'd2,
    CRC_8    = 2'd3
  } crc_type_t;

  typedef enum logic [1:0] {
    ST_IR = 2'd0,
    ST_FO = 2'd1,
    ST_SO = 2'd2
  } comp_state_t;

  // Implementation parameters of the compressor (chosen values of the design).
  localparam int unsigned IR_TIMEOUT   = 64;
  localparam int unsigned FO_TIMEOUT   = 32;
  localparam int unsigned OPTIMISTIC   = 2;
  localparam int unsigned WIN_SIZE     = 4;

  // Largest header handled: two IPv6 levels, UDP and RTP.
  localparam int unsigned HDR_MAX_BYTES = 100;

  // ---------------------------------------------------------------- flags
  // Per IP level change flags.
  typedef struct packed {
    logic tos;
    logic ttl;
    logic df;
    logic nbo;
    logic rnd;
  } ip_flags_t;

  // Flag record kept in the sliding window (SW flags) and used for field
  // selection (FS flags).
  typedef struct packed {
    logic      stat;
    logic      dyn;
    logic      mt;
    logic      nack;
    ip_flags_t ip_inner;
    ip_flags_t ip_outer;
    logic      checksum;
    logic      p;
    logic      x;
    logic      pt;
    logic      tss;
    logic      offset;
    logic      ts_wlsb;
  } flags_t;

  localparam int unsigned FLAGS_W = $bits(flags_t);

  // ---------------------------------------------------------------- packets
  localparam int unsigned NUM_PKT = 38;

  typedef struct packed {
    logic [5:0] sn;
    logic [4:0] ipid1;
    logic [4:0] ipid2;
    logic [5:0] ts;
    logic       update;
    crc_type_t  crc;
  } pkt_cap_t;

  // Packet type index into the capability table, plus the two
  // initialisation packets after it.
  localparam logic [5:0] PKT_IR_DYN = 6'd38;
  localparam logic [5:0] PKT_IR     = 6'd39;

  // Capability of compressed packet number idx (0 = most compact).
  function automatic pkt_cap_t pkt_cap(input logic [5:0] idx);
    pkt_cap_t c;
    //                     SN  ID1 ID2 TS  upd   CRC
    unique case (idx)
      6'd0 : c = '{6'd6 , 5'd0 , 5'd0 , 6'd0 , 1'b0, CRC_NONE}; // R-0
      6'd1 : c = '{6'd7 , 5'd0 , 5'd0 , 6'd0 , 1'b1, CRC_7   }; // R-0-CRC
      6'd2 : c = '{6'd6 , 5'd5 , 5'd0 , 6'd0 , 1'b0, CRC_NONE}; // R-1-ID
      6'd3 : c = '{6'd6 , 5'd0 , 5'd0 , 6'd5 , 1'b0, CRC_NONE}; // R-1-TS
      6'd4 : c = '{6'd4 , 5'd0 , 5'd0 , 6'd0 , 1'b1, CRC_3   }; // UO-0
      6'd5 : c = '{6'd4 , 5'd5 , 5'd0 , 6'd0 , 1'b1, CRC_3   }; // UO-1-ID
      6'd6 : c = '{6'd4 , 5'd0 , 5'd0 , 6'd5 , 1'b1, CRC_3   }; // UO-1-TS
      6'd7 : c = '{6'd6 , 5'd5 , 5'd0 , 6'd0 , 1'b1, CRC_7   }; // UOR-2-ID
      6'd8 : c = '{6'd9 , 5'd8 , 5'd0 , 6'd0 , 1'b0, CRC_NONE}; // R-1-ID-EXT0
      6'd9 : c = '{6'd7 , 5'd8 , 5'd0 , 6'd0 , 1'b1, CRC_3   }; // UO-1-ID-EXT0
      6'd10: c = '{6'd6 , 5'd0 , 5'd0 , 6'd5 , 1'b1, CRC_7   }; // UOR-2-TS
      6'd11: c = '{6'd9 , 5'd0 , 5'd0 , 6'd8 , 1'b0, CRC_NONE}; // R-1-TS-EXT0
      6'd12: c = '{6'd9 , 5'd8 , 5'd0 , 6'd0 , 1'b1, CRC_7   }; // UOR-2-ID-EXT0
      6'd13: c = '{6'd9 , 5'd0 , 5'd0 , 6'd8 , 1'b1, CRC_7   }; // UOR-2-TS-EXT0
      6'd14: c = '{6'd9 , 5'd8 , 5'd0 , 6'd8 , 1'b0, CRC_NONE}; // R-1-TS-EXT1
      6'd15: c = '{6'd7 , 5'd8 , 5'd0 , 6'd8 , 1'b1, CRC_3   }; // UO-1-ID-EXT1
      6'd16: c = '{6'd7 , 5'd16, 5'd0 , 6'd8 , 1'b1, CRC_3   }; // UO-1-ID-EXT2
      6'd17: c = '{6'd9 , 5'd8 , 5'd0 , 6'd8 , 1'b1, CRC_7   }; // UOR-2-TS-EXT1
      6'd18: c = '{6'd9 , 5'd16, 5'd0 , 6'd8 , 1'b0, CRC_NONE}; // R-1-ID-EXT2
      6'd19: c = '{6'd9 , 5'd8 , 5'd0 , 6'd16, 1'b0, CRC_NONE}; // R-1-TS-EXT2
      6'd20: c = '{6'd9 , 5'd16, 5'd0 , 6'd8 , 1'b1, CRC_7   }; // UOR-2-ID-EXT2
      6'd21: c = '{6'd9 , 5'd8 , 5'd0 , 6'd16, 1'b1, CRC_7   }; // UOR-2-TS-EXT2
      6'd22: c = '{6'd14, 5'd16, 5'd16, 6'd29, 1'b0, CRC_NONE}; // R-1-ID-EXT3
      6'd23: c = '{6'd12, 5'd16, 5'd16, 6'd29, 1'b1, CRC_3   }; // UO-1-ID-EXT3
      6'd24: c = '{6'd14, 5'd16, 5'd16, 6'd29, 1'b1, CRC_7   }; // UOR-2-ID-EXT3
      6'd25: c = '{6'd14, 5'd16, 5'd16, 6'd32, 1'b0, CRC_NONE}; // R-1-TS-EXT3
      6'd26: c = '{6'd14, 5'd16, 5'd16, 6'd32, 1'b1, CRC_7   }; // UOR-2-TS-EXT3
      6'd27: c = '{6'd4 , 5'd0 , 5'd0 , 6'd6 , 1'b1, CRC_3   }; // UO-1
      6'd28: c = '{6'd6 , 5'd0 , 5'd0 , 6'd6 , 1'b0, CRC_NONE}; // R-1
      6'd29: c = '{6'd6 , 5'd0 , 5'd0 , 6'd6 , 1'b1, CRC_7   }; // UOR-2
      6'd30: c = '{6'd9 , 5'd0 , 5'd0 , 6'd9 , 1'b0, CRC_NONE}; // R-1-EXT0
      6'd31: c = '{6'd9 , 5'd0 , 5'd0 , 6'd9 , 1'b1, CRC_7   }; // UOR-2-EXT0
      6'd32: c = '{6'd9 , 5'd0 , 5'd0 , 6'd17, 1'b0, CRC_NONE}; // R-1-EXT1
      6'd33: c = '{6'd9 , 5'd0 , 5'd0 , 6'd17, 1'b1, CRC_7   }; // UOR-2-EXT1
      6'd34: c = '{6'd9 , 5'd0 , 5'd0 , 6'd25, 1'b0, CRC_NONE}; // R-1-EXT2
      6'd35: c = '{6'd9 , 5'd0 , 5'd0 , 6'd25, 1'b1, CRC_7   }; // UOR-2-EXT2
      6'd36: c = '{6'd14, 5'd0 , 5'd0 , 6'd32, 1'b0, CRC_NONE}; // R-1-EXT3
      6'd37: c = '{6'd14, 5'd16, 5'd16, 6'd32, 1'b1, CRC_7   }; // UOR-2-EXT3
      6'd38: c = '{6'd16, 5'd16, 5'd16, 6'd32, 1'b1, CRC_8   }; // IR-DYN
      default: c = '{6'd16, 5'd16, 5'd16, 6'd32, 1'b1, CRC_8 }; // IR
    endcase
    return c;
  endfunction

  // Packet class masks over the 38 compressed types.
  function automatic logic [NUM_PKT-1:0] r_only_mask();   // R-0, R-0-CRC, R-1*
    logic [NUM_PKT-1:0] m;
    m = '0;
    for (int i = 0; i < NUM_PKT; i++) begin
      pkt_cap_t c;
      c = pkt_cap(6'(i));
      // R-mode packets are the ones without a CRC, plus R-0-CRC (index 1).
      m[i] = (c.crc == CRC_NONE) || (i == 1);
    end
    return m;
  endfunction

  function automatic logic [NUM_PKT-1:0] uo_only_mask();  // UO-0, UO-1*
    logic [NUM_PKT-1:0] m;
    m = '0;
    for (int i = 0; i < NUM_PKT; i++) m[i] = (pkt_cap(6'(i)).crc == CRC_3);
    return m;
  endfunction

  function automatic logic [NUM_PKT-1:0] ext3_mask();     // *-EXT3
    logic [NUM_PKT-1:0] m;
    m = '0;
    for (int i = 22; i <= 26; i++) m[i] = 1'b1;
    m[36] = 1'b1;
    m[37] = 1'b1;
    return m;
  endfunction

  // UOR-2 family (CRC-7 packets apart from R-0-CRC).
  function automatic logic [NUM_PKT-1:0] uor2_mask();
    logic [NUM_PKT-1:0] m;
    m = '0;
    for (int i = 0; i < NUM_PKT; i++) m[i] = (pkt_cap(6'(i)).crc == CRC_7) && (i != 1);
    return m;
  endfunction

  // Packets with no room for the RTP marker bit (type 0 packets).
  localparam logic [NUM_PKT-1:0] NO_MBIT_MASK = 38'b0_0000_0000_0000_0000_0000_0000_0000_0001_0011;

  // ---------------------------------------------------------------- header
  // Static part of one IP level: version, protocol/next header, flow label,
  // source and destination address (IPv4 addresses in the low 32 bits).
  typedef struct packed {
    logic [3:0]   version;
    logic [7:0]   proto;
    logic [19:0]  flow_label;
    logic [127:0] saddr;
    logic [127:0] daddr;
  } ip_static_t;

  typedef struct packed {
    ip_static_t [1:0] ip;      // [0] = outer (first) level, [1] = inner
    logic [15:0]      sport;
    logic [15:0]      dport;
    logic [31:0]      ssrc;
  } static_t;

  typedef struct packed {
    logic [7:0]  tos;          // IPv4 TOS / IPv6 traffic class
    logic [7:0]  ttl;          // IPv4 TTL / IPv6 hop limit
    logic        df;
    logic [15:0] ipid;         // as received (wire order)
  } ip_dyn_t;

  typedef struct packed {
    ip_dyn_t [1:0] ip;
    logic [15:0]   udp_csum;
    logic          p;
    logic          x;
    logic          m;
    logic [3:0]    cc;
    logic [6:0]    pt;
    logic [15:0]   sn;
    logic [31:0]   ts;
  } dyn_t;

  // Classifier result.
  typedef struct packed {
    profile_t    profile;
    logic        two_levels;       // an outer and an inner IP header
    logic [1:0]  is_v4;            // per level, [0] = outer
    logic [6:0]  ip_off_1;         // byte offset of the inner IP header
    logic [6:0]  udp_off;
    logic [6:0]  rtp_off;
    logic [6:0]  payload_off;
    logic [31:0] stream_id;
  } cls_t;

  // ---------------------------------------------------------------- context
  typedef struct packed {
    logic                       valid;
    profile_t                   profile;
    logic [2:0]                 ip_stack;     // {two_levels, is_v4[1:0]}
    logic [31:0]                stream_id;
    static_t                    stat;         // reference header, static part
    dyn_t                       dyn;          // reference header, dynamic part
    // IP-ID pattern (inner level)
    logic                       nbo;
    logic                       rnd;
    logic [15:0]                ipid_1;
    logic [15:0]                sn_1;
    logic [15:0]                ipid_2;
    logic [15:0]                sn_2;
    // RTP pattern
    logic [31:0]                ts_stride;
    logic [31:0]                ts_offset;
    logic                       ts_jump;
    // mode status
    mode_t                      mode;
    logic                       mode_trans;   // 1 = transition pending
    // timeout counters
    logic [7:0]                 ir_cnt;
    logic [7:0]                 fo_cnt;
    // sliding windows (administrative part + entries)
    logic [2:0]                 win_cnt;
    logic [1:0]                 win_ptr;
    flags_t [WIN_SIZE-1:0]      win_flags;
    logic [WIN_SIZE-1:0][15:0]  win_ipid_off;
    logic [WIN_SIZE-1:0][15:0]  win_sn;
    logic [WIN_SIZE-1:0][31:0]  win_ts_scaled;
    logic [WIN_SIZE-1:0][31:0]  win_ts;
  } ctx_t;

  // Result handed to the packetiser / host for every packet.
  typedef struct packed {
    profile_t    profile;
    logic [5:0]  pkt_type;       // 0..37 compressed, 38 IR-DYN, 39 IR
    comp_state_t state;
    logic [5:0]  k_sn;
    logic [5:0]  k_ipid;
    logic [5:0]  k_ts;
    logic        ts_unscaled;    // TS bits refer to the unscaled timestamp
    crc_type_t   crc_type;
    logic [7:0]  crc;
    logic [15:0] ipid_offset;
    logic [31:0] ts_scaled;
    flags_t      fs_flags;
  } result_t;

endpackage
