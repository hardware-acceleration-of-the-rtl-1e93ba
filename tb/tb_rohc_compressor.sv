// tb_rohc_compressor: end-to-end test of the RoHC compressor at its default
// parameters.
//
// A packet generator builds IPv4/UDP/RTP (and IPv6, tunnelled, UDP-only and
// non-compressible) headers, writes them into the packet RAM through the host
// port and starts the compressor. A behavioural context memory (one ctx_t
// per user, answering reads after a few cycles) stands in for the external
// DRAM. The test drives one voice stream through start-up, steady state,
// timeouts, a silence gap, field changes, a marker bit, an SN jump, a switch
// to reliable mode and a pending mode transition, plus other streams, and
// checks:
//   - packet types: three IR packets at stream start, UO-0 in steady state,
//     IR / IR-DYN refreshes exactly at the IR (64) and FO (32) timeouts,
//     extension-3 packets after a TTL change, IR after a static change, R-0 in
//     R mode, UOR-2 extension 3 during a mode transition, no type-0 packet
//     with the marker set, IR-DYN when no compressed packet can carry the SN;
//   - bits needed (k) against values worked out from the stream;
//   - CRC-3/7/8 against a bit-serial CRC over the header bytes;
//   - IP-ID byte order / randomness stored in the context;
//   - profiles of the other kinds of packets;
//   - processing time: at most 410 cycles per packet (4.1 us at 100 MHz).
// Each mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_rohc_compressor;
  import rohc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        pkt_we = 1'b0;
  logic [7:0]  pkt_addr = '0;
  logic [31:0] pkt_wdata = '0;
  logic        start = 1'b0;
  logic [15:0] uid = '0, pkt_len = '0;
  logic        busy, done;
  result_t     result;
  logic        ctx_rd_req, ctx_wr_req, ctx_rd_valid;
  logic [15:0] ctx_addr;
  ctx_t        ctx_wdata, ctx_rdata;

  rohc_compressor dut (
    .clk, .rst_n, .pkt_we, .pkt_addr, .pkt_wdata, .start, .uid, .pkt_len,
    .busy, .done, .result,
    .ctx_rd_req, .ctx_wr_req, .ctx_addr, .ctx_wdata, .ctx_rd_valid, .ctx_rdata
  );

  // ------------------------------------------------------------ context memory model
  localparam int NUSERS = 8;      // users 0..7 (low three address bits)
  ctx_t ctx_mem [NUSERS];
  int   rd_delay;
  logic [15:0] rd_addr;

  initial begin
    for (int i = 0; i < NUSERS; i++) ctx_mem[i] = '0;
    ctx_rd_valid = 1'b0;
    ctx_rdata    = '0;
    rd_delay     = 0;
    rd_addr      = '0;
  end

  always @(posedge clk) begin
    ctx_rd_valid <= 1'b0;
    if (ctx_wr_req) ctx_mem[ctx_addr[2:0]] <= ctx_wdata;
    if (ctx_rd_req) begin
      rd_delay <= 4;
      rd_addr  <= ctx_addr;
    end else if (rd_delay > 1) begin
      rd_delay <= rd_delay - 1;
    end else if (rd_delay == 1) begin
      rd_delay     <= 0;
      ctx_rd_valid <= 1'b1;
      ctx_rdata    <= ctx_mem[rd_addr[2:0]];
    end
  end

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int n_ir = 0, n_irdyn = 0, n_uo0 = 0, n_ext3 = 0, n_r0 = 0, n_mt = 0, n_mbit = 0;
  int n_ir_to = 0, n_fo_to = 0, n_jump = 0, n_fallback = 0, n_rnd = 0, n_swap = 0;
  int n_p0 = 0, n_p2 = 0, n_v6 = 0, n_tunnel = 0, n_static = 0, n_crc3 = 0, n_crc7 = 0, n_crc8 = 0;
  int max_cycles = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ packet description
  typedef struct {
    bit          v6;
    bit          tunnel;
    bit          rtp;
    bit [7:0]    proto;
    bit [31:0]   saddr, daddr;
    bit [7:0]    tos, ttl;
    bit [15:0]   ipid;
    bit          df;
    bit [15:0]   sport, dport, csum;
    bit [1:0]    rtp_ver;
    bit          m;
    bit [6:0]    pt;
    bit [15:0]   sn;
    bit [31:0]   ts;
    bit [31:0]   ssrc;
  } pkt_t;

  byte unsigned bytes [$];

  function automatic void put16(input bit [15:0] v);
    bytes.push_back(v[15:8]); bytes.push_back(v[7:0]);
  endfunction
  function automatic void put32(input bit [31:0] v);
    put16(v[31:16]); put16(v[15:0]);
  endfunction

  function automatic void ipv4(input pkt_t p, input bit [7:0] proto);
    bytes.push_back(8'h45); bytes.push_back(p.tos);
    put16(16'd0);                                   // total length (not looked at)
    put16(p.ipid);
    bytes.push_back({1'b0, p.df, 6'b0}); bytes.push_back(8'h00);
    bytes.push_back(p.ttl); bytes.push_back(proto);
    put16(16'h0000);                                // header checksum
    put32(p.saddr); put32(p.daddr);
  endfunction

  function automatic void ipv6(input pkt_t p, input bit [7:0] nxt);
    put32({4'h6, p.tos, 20'h12345});
    put16(16'd0); bytes.push_back(nxt); bytes.push_back(p.ttl);
    for (int i = 0; i < 3; i++) put32(32'h2001_0db8 + i);
    put32(p.saddr);
    for (int i = 0; i < 3; i++) put32(32'h2001_0db8 + 16 + i);
    put32(p.daddr);
  endfunction

  function automatic int build(input pkt_t p);
    bytes.delete();
    if (p.tunnel) begin
      ipv6(p, 8'd4);
      ipv4(p, p.proto);
    end else if (p.v6) ipv6(p, p.proto);
    else               ipv4(p, p.proto);
    put16(p.sport); put16(p.dport); put16(16'd172); put16(p.csum);
    if (p.rtp) begin
      bytes.push_back({p.rtp_ver, 1'b0, 1'b0, 4'd0});
      bytes.push_back({p.m, p.pt});
      put16(p.sn); put32(p.ts); put32(p.ssrc);
    end
    return bytes.size();
  endfunction

  // reference CRC: bit-serial, bytes in order, each byte least significant bit first
  function automatic bit [7:0] ref_crc(input crc_type_t t, input int n);
    int          w;
    bit [7:0]    poly, c;
    case (t)
      CRC_3:   begin w = 3; poly = 8'h03; end
      CRC_7:   begin w = 7; poly = 8'h4f; end
      default: begin w = 8; poly = 8'h07; end
    endcase
    c = (8'd1 << w) - 1;
    for (int i = 0; i < n; i++)
      for (int b = 0; b < 8; b++) begin
        bit fb;
        fb = c[w-1] ^ bytes[i][b];
        c  = (c << 1) & ((8'd1 << w) - 1);
        if (fb) c ^= poly;
      end
    return c;
  endfunction

  // ------------------------------------------------------------ run one packet
  result_t r;
  int      hdr_len;

  task automatic send(input pkt_t p, input int user);
    int n, cyc;
    n = build(p);
    hdr_len = n;
    for (int i = 0; i < n; i += 4) begin
      @(negedge clk);
      pkt_we    = 1'b1;
      pkt_addr  = 8'(i / 4);
      pkt_wdata = {bytes[i], (i+1 < n) ? bytes[i+1] : 8'h0, (i+2 < n) ? bytes[i+2] : 8'h0,
                   (i+3 < n) ? bytes[i+3] : 8'h0};
    end
    @(negedge clk);
    pkt_we  = 1'b0;
    start   = 1'b1;
    uid     = 16'(user);
    pkt_len = 16'(n + 20);                          // header plus 20 payload bytes
    @(negedge clk);
    start = 1'b0;
    cyc   = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    r = result;
    if (cyc > max_cycles) max_cycles = cyc;
    chk(cyc <= 410, $sformatf("packet took %0d cycles", cyc));
    // a profile 2 header ends after UDP: RTP-looking bytes are payload
    if (r.profile == PROFILE_2 && p.rtp) n = n - 12;
    if (r.crc_type != CRC_NONE) begin
      chk(r.crc == ref_crc(r.crc_type, n), $sformatf("CRC type %0d len %0d user %0d got %h want %h", r.crc_type, n, user,
          r.crc, ref_crc(r.crc_type, n)));
      case (r.crc_type)
        CRC_3: n_crc3++;
        CRC_7: n_crc7++;
        default: n_crc8++;
      endcase
    end
    if (r.pkt_type == PKT_IR)     n_ir++;
    if (r.pkt_type == PKT_IR_DYN) n_irdyn++;
    repeat (2) @(negedge clk);
  endtask

  function automatic bit is_ext3(input logic [5:0] t);
    return t inside {6'd22, 6'd23, 6'd24, 6'd25, 6'd26, 6'd36, 6'd37};
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  pkt_t v;       // the main voice stream, user 1
  int   since_ir, since_refresh;

  task automatic next_voice();
    v.sn   = v.sn + 1;
    v.ts   = v.ts + 160;
    v.ipid = v.ipid + 1;
  endtask

  initial begin
    pkt_t q;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    v = '{v6: 0, tunnel: 0, rtp: 1, proto: 8'd17, saddr: 32'h0a000001, daddr: 32'h0a000002,
          tos: 8'h00, ttl: 8'd64, ipid: 16'h1000, df: 1'b1, sport: 16'd5004, dport: 16'd5006,
          csum: 16'h1234, rtp_ver: 2'd2, m: 1'b0, pt: 7'd0, sn: 16'd100, ts: 32'd16000,
          ssrc: 32'hCAFEF00D};

    // ---- start-up: three IR packets, then compressed
    for (int i = 0; i < 3; i++) begin
      send(v, 1);
      chk(r.pkt_type == PKT_IR && r.state == ST_IR && r.profile == PROFILE_1,
          $sformatf("start-up packet %0d type %0d", i, r.pkt_type));
      next_voice();
    end
    since_ir = 0;
    since_refresh = 0;
    // ---- steady state and the two timeouts
    for (int i = 0; i < 140; i++) begin
      send(v, 1);
      since_ir++;
      since_refresh++;
      if (since_ir == 64) begin
        chk(r.pkt_type == PKT_IR, $sformatf("IR timeout expected, type %0d", r.pkt_type));
        n_ir_to++;
        since_ir = 0;
        since_refresh = 0;
      end else if (since_refresh == 32) begin
        chk(r.pkt_type == PKT_IR_DYN && r.state == ST_FO,
            $sformatf("FO timeout expected, type %0d", r.pkt_type));
        n_fo_to++;
        since_refresh = 0;
      end else if (i >= 2) begin
        chk(r.pkt_type == 6'd4 && r.k_sn == 6'd4 && r.k_ts == 6'd0 && r.k_ipid == 6'd0 &&
            r.state == ST_SO && r.crc_type == CRC_3,
            $sformatf("steady packet %0d: type %0d k %0d/%0d/%0d", i, r.pkt_type, r.k_sn,
                      r.k_ipid, r.k_ts));
        if (r.pkt_type == 6'd4) n_uo0++;
      end
      next_voice();
    end

    // ---- silence gap: TS jumps by 10 frames while SN steps by one
    v.ts = v.ts + 160 * 9;
    send(v, 1);
    chk(r.pkt_type != 6'd4 && r.k_ts > 0, $sformatf("TS jump: type %0d k_ts %0d", r.pkt_type, r.k_ts));
    if (r.k_ts > 0) n_jump++;
    next_voice();
    for (int i = 0; i < 4; i++) begin send(v, 1); next_voice(); end
    chk(r.pkt_type == 6'd4 || r.pkt_type == PKT_IR_DYN || r.pkt_type == PKT_IR,
        $sformatf("after TS jump settles: type %0d", r.pkt_type));

    // ---- TTL change: extension 3 packets, sent three times
    v.ttl = 8'd63;
    for (int i = 0; i < 3; i++) begin
      send(v, 1);
      if (r.pkt_type != PKT_IR && r.pkt_type != PKT_IR_DYN) begin
        chk(is_ext3(r.pkt_type), $sformatf("TTL change %0d: type %0d", i, r.pkt_type));
        if (is_ext3(r.pkt_type)) n_ext3++;
      end
      next_voice();
    end
    send(v, 1); next_voice();

    // ---- marker bit: no type 0 packet
    v.m = 1'b1;
    send(v, 1);
    chk(r.pkt_type != 6'd4 && r.pkt_type != 6'd0 && r.pkt_type != 6'd1,
        $sformatf("marker: type %0d", r.pkt_type));
    if (r.pkt_type < 6'd38) n_mbit++;
    v.m = 1'b0;
    next_voice();
    send(v, 1); next_voice();

    // ---- SN jump no compressed packet can carry: IR-DYN from the search
    v.sn = v.sn + 16'd20000;
    v.ts = v.ts + 32'd160 * 20000;
    v.ipid = v.ipid + 16'd20000;
    send(v, 1);
    chk(r.pkt_type == PKT_IR_DYN, $sformatf("SN jump: type %0d k_sn %0d", r.pkt_type, r.k_sn));
    if (r.pkt_type == PKT_IR_DYN && r.k_sn > 6'd14) n_fallback++;
    next_voice();
    for (int i = 0; i < 4; i++) begin send(v, 1); next_voice(); end

    // ---- static change (destination address): IR again three times
    v.daddr = 32'h0a000003;
    for (int i = 0; i < 3; i++) begin
      send(v, 1);
      chk(r.pkt_type == PKT_IR, $sformatf("static change %0d: type %0d", i, r.pkt_type));
      if (r.pkt_type == PKT_IR) n_static++;
      next_voice();
    end
    for (int i = 0; i < 3; i++) begin send(v, 1); next_voice(); end
    chk(r.pkt_type == 6'd4, $sformatf("after static change: type %0d", r.pkt_type));

    // ---- reliable mode (as feedback would set it): R-0 packets
    @(negedge clk);
    ctx_mem[1].mode = MODE_R;
    for (int i = 0; i < 3; i++) begin
      send(v, 1);
      // the first is R-0; as R-0/R-1 do not update the context, later ones see
      // a growing SN/TS distance and may need an R-1 packet with TS bits
      if (i == 0) chk(r.pkt_type == 6'd0 && r.crc_type == CRC_NONE, $sformatf("R mode: type %0d", r.pkt_type));
      else chk(r.pkt_type < 6'd38 && r.crc_type != CRC_3, $sformatf("R mode: type %0d", r.pkt_type));
      if (r.pkt_type == 6'd0) n_r0++;
      next_voice();
    end

    // ---- a pending mode transition: only UOR-2 with extension 3
    @(negedge clk);
    ctx_mem[1].mode       = MODE_O;
    ctx_mem[1].mode_trans = 1'b1;
    send(v, 1);
    chk(r.pkt_type inside {6'd24, 6'd26, 6'd37} && r.crc_type == CRC_7,
        $sformatf("mode transition: type %0d", r.pkt_type));
    if (r.pkt_type inside {6'd24, 6'd26, 6'd37}) n_mt++;
    next_voice();

    // ---- random IP-ID stream (user 2) and byte-swapped IP-ID stream (user 3)
    q = v;
    q.ssrc = 32'h11112222;
    for (int i = 0; i < 8; i++) begin
      q.ipid = 16'($urandom);
      send(q, 2);
      q.sn = q.sn + 1; q.ts = q.ts + 160;
    end
    chk(ctx_mem[2].rnd == 1'b1, "random IP-ID not detected");
    chk(r.k_ipid == 6'd0, "random IP-ID must not be offset-encoded");
    if (ctx_mem[2].rnd) n_rnd++;

    q = v;
    q.ssrc = 32'h33334444;
    for (int i = 0; i < 8; i++) begin
      bit [15:0] id;
      id     = 16'h0200 + 16'(i);
      q.ipid = {id[7:0], id[15:8]};             // little-endian counter
      send(q, 3);
      q.sn = q.sn + 1; q.ts = q.ts + 160;
    end
    chk(ctx_mem[3].nbo == 1'b0 && ctx_mem[3].rnd == 1'b0, "byte-swapped IP-ID not detected");
    chk(r.pkt_type == 6'd4, $sformatf("byte-swapped IP-ID stream: type %0d", r.pkt_type));
    if (ctx_mem[3].nbo == 1'b0) n_swap++;

    // ---- other packet kinds
    q = v; q.proto = 8'd6;                          // TCP: profile 0
    send(q, 4);
    chk(r.profile == PROFILE_0, "TCP packet must be profile 0");
    if (r.profile == PROFILE_0) n_p0++;
    q = v; q.rtp_ver = 2'd1;                        // not RTP: profile 2
    send(q, 4);
    chk(r.profile == PROFILE_2 && r.pkt_type == PKT_IR, "UDP packet must be profile 2 / IR");
    if (r.profile == PROFILE_2) n_p2++;
    q = v; q.v6 = 1'b1; q.ssrc = 32'h66666666;      // IPv6 stream
    for (int i = 0; i < 6; i++) begin
      send(q, 5);
      q.sn = q.sn + 1; q.ts = q.ts + 160;
    end
    chk(r.profile == PROFILE_1 && r.pkt_type == 6'd4, $sformatf("IPv6 stream: type %0d", r.pkt_type));
    if (r.pkt_type == 6'd4) n_v6++;
    q = v; q.tunnel = 1'b1; q.ssrc = 32'h77777777;  // IPv4 in IPv6
    for (int i = 0; i < 6; i++) begin
      send(q, 6);
      q.sn = q.sn + 1; q.ts = q.ts + 160; q.ipid = q.ipid + 1;
    end
    chk(r.profile == PROFILE_1 && r.pkt_type == 6'd4, $sformatf("tunnel stream: type %0d", r.pkt_type));
    if (r.pkt_type == 6'd4) n_tunnel++;

    // ---- every mechanism must have happened
    chk(n_ir > 0,      "no IR packet");
    chk(n_irdyn > 0,   "no IR-DYN packet");
    chk(n_uo0 > 0,     "no UO-0 packet");
    chk(n_ir_to > 0,   "no IR timeout");
    chk(n_fo_to > 0,   "no FO timeout");
    chk(n_jump > 0,    "no TS jump");
    chk(n_ext3 > 0,    "no extension-3 packet");
    chk(n_mbit > 0,    "no marker-bit packet");
    chk(n_fallback > 0,"no IR-DYN fallback");
    chk(n_static > 0,  "no static change");
    chk(n_r0 > 0,      "no R-0 packet");
    chk(n_mt > 0,      "no mode-transition packet");
    chk(n_rnd > 0,     "no random IP-ID");
    chk(n_swap > 0,    "no byte-swapped IP-ID");
    chk(n_p0 > 0 && n_p2 > 0, "profiles 0 and 2 not seen");
    chk(n_v6 > 0 && n_tunnel > 0, "IPv6 / tunnel streams not compressed");
    chk(n_crc3 > 0 && n_crc7 > 0 && n_crc8 > 0, "not all CRC types used");
    $display("mechanisms: IR=%0d IR-DYN=%0d UO-0=%0d IRto=%0d FOto=%0d jump=%0d ext3=%0d mbit=%0d fallback=%0d static=%0d R-0=%0d mt=%0d rnd=%0d swap=%0d p0=%0d p2=%0d v6=%0d tunnel=%0d crc3/7/8=%0d/%0d/%0d",
             n_ir, n_irdyn, n_uo0, n_ir_to, n_fo_to, n_jump, n_ext3, n_mbit, n_fallback, n_static,
             n_r0, n_mt, n_rnd, n_swap, n_p0, n_p2, n_v6, n_tunnel, n_crc3, n_crc7, n_crc8);
    $display("longest packet: %0d cycles", max_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
