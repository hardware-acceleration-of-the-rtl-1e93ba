// rohc_compressor: one-stage full-hardware RoHC compressor (profile 1
// RTP/UDP/IP, with profile 2 UDP/IP and profile 0 classification).
//
// A controller stack processes one packet at a time, stage after stage, and
// calls on shared datapath units:
//   LOAD     the header words are read from the packet RAM (single port, the
//            host writes the packet there while the compressor is idle) into
//            a header register; the context fetch from external memory is
//            issued at the same time.
//   CLASS    classifier + parser: profile, offsets, static/dynamic fields.
//   FETCH    wait for the context; if it is empty or belongs to another
//            stream (stream ID or protocol stack differ) it is initialised.
//   IPID     IP-ID byte order / randomness and IP-ID offset (inner IPv4).
//   RTP      TS stride, offset, jump and scaled TS (shared divider).
//   FLAGS    change flags, ORed together in the bit-packing unit in two
//            steps; then field selection (optimistic approach) and the
//            IR / IR-DYN / compressed decision with the timeout counters.
//   WLSB     for a compressed packet, the WLSB encoder gives the bits needed
//            for SN, IP-ID offset and TS (scaled, or unscaled when the stride
//            or offset changed; none when TS follows SN).
//   SEARCH   packet-type search over the 38 compressed types; IR-DYN if none
//            fits.
//   CRC      CRC-3/7/8 as the chosen packet needs, over the original header
//            bytes, with the mixed-width CRC unit (32-bit steps, then a 16-
//            and/or 8-bit step for the tail).
//   UPDATE   context write-back: everything for a context-updating packet
//            (reference header, patterns, counters, sliding windows), only the
//            IP-ID pattern otherwise.
//   DONE     result valid for one cycle (done).
// Profile 0 packets skip from CLASS to DONE. Profile 2 packets use an SN the
// compressor counts itself and have no RTP stage.
//
// Interfaces:
//   host:    pkt_we/pkt_addr/pkt_wdata write 32-bit big-endian packet words
//            (first byte in bits 31:24) while idle; start with uid and
//            pkt_len (bytes) begins a packet; busy until done.
//   context: ctx_rd_req (one cycle) with ctx_addr = uid; the memory answers
//            with ctx_rd_valid and ctx_rdata some cycles later.
//            ctx_wr_req (one cycle) writes ctx_wdata to ctx_addr.
//   result:  result_t record (packet type, state, bits needed per field,
//            CRC, IP-ID offset, scaled TS, FS flags).
// The packetiser that would turn the result into header bytes is not part of
// this block.
//
// Source: the stage order, the shared units (bit packing, divider, WLSB
// encoder, search table, CRC) and the context sections follow the reference
// one-stage hardware compressor. This design's own choices: the single-beat
// context port in place of the DDR2 controller, CRC over the uncompressed
// header, the packet masks, profile 2 SN generation, and the result record in
// place of the packetizer, which is not included. Lint notes: tries, the
// timeout outputs of rohc_comp_state, the divider-side busy and the unused
// outputs of the bit-packing unit are left unconnected on purpose (they are
// status signals of the sub-blocks), and rst_n is also used to disable a
// handshake assertion inside rohc_rtp_detect.
module rohc_compressor
  import rohc_pkg::*;
#(
  parameter int unsigned PKT_WORDS = 256         // packet RAM depth (1 KiB)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host side
  input  logic                         pkt_we,
  input  logic [$clog2(PKT_WORDS)-1:0] pkt_addr,
  input  logic [31:0]                  pkt_wdata,
  input  logic                         start,
  input  logic [15:0]                  uid,
  input  logic [15:0]                  pkt_len,
  output logic                         busy,
  output logic                         done,
  output result_t                      result,
  // external context memory
  output logic                         ctx_rd_req,
  output logic                         ctx_wr_req,
  output logic [15:0]                  ctx_addr,
  output ctx_t                         ctx_wdata,
  input  logic                         ctx_rd_valid,
  input  ctx_t                         ctx_rdata
);

  localparam int unsigned HDR_WORDS = (HDR_MAX_BYTES + 3) / 4;

  typedef enum logic [4:0] {
    S_IDLE, S_LOAD, S_CLASS, S_FETCH, S_IPID, S_RTP, S_FLAGS0, S_FLAGS1,
    S_DECIDE, S_WLSB_SN, S_WLSB_ID, S_WLSB_TS, S_SEARCH, S_CRC_INIT, S_CRC, S_UPDATE,
    S_DONE
  } st_t;
  st_t st;

  // ------------------------------------------------------------ registers
  logic [HDR_WORDS*4-1:0][7:0] hdr_q;
  logic [15:0]   len_q;
  logic [5:0]    rd_cnt, wr_cnt, n_words;
  logic          ctx_seen;
  ctx_t          ctx_q;
  logic          first_q;
  cls_t          cls_q;
  static_t       stat_q;
  dyn_t          dyn_q;
  logic          nbo_q, rnd_q;
  logic [15:0]   ipid_off_q;
  logic          jump_q;
  logic [31:0]   stride_q, offset_q, scaled_q;
  flags_t        fs_q, sw_q;
  comp_state_t   state_q;
  logic [7:0]    ir_next_q, fo_next_q;
  logic [5:0]    k_sn_q, k_id_q, k_ts_q;
  logic          ts_unscaled_q;
  logic [5:0]    pkt_q;
  logic [7:0]    crc_q;
  logic [6:0]    crc_pos;
  logic          wlsb_started;

  // ------------------------------------------------------------ packet RAM
  logic                         ram_we;
  logic [$clog2(PKT_WORDS)-1:0] ram_addr;
  logic [31:0]                  ram_rdata;

  assign ram_we   = (st == S_IDLE) && pkt_we;
  assign ram_addr = (st == S_IDLE) ? (start ? '0 : pkt_addr) : ($clog2(PKT_WORDS))'(rd_cnt);

  rohc_sp_ram #(.DEPTH(PKT_WORDS), .W(32)) u_pkt_ram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(pkt_wdata), .rdata(ram_rdata)
  );

  // ------------------------------------------------------------ classify / parse
  logic [HDR_MAX_BYTES-1:0][7:0] hdr_bytes;
  cls_t    cls_c;
  static_t stat_c;
  dyn_t    dyn_c;

  assign hdr_bytes = hdr_q[HDR_MAX_BYTES-1:0];

  rohc_classifier u_cls (.hdr(hdr_bytes), .len(len_q), .cls(cls_c));
  rohc_parser     u_parse (.hdr(hdr_bytes), .cls(cls_q), .st(stat_c), .dy(dyn_c));

  // ------------------------------------------------------------ IP-ID pattern
  logic        id_nbo, id_rnd;
  logic [15:0] id_off;

  rohc_ipid_detect u_ipid (
    .hdr_ipid(dyn_q.ip[1].ipid), .hdr_sn(dyn_q.sn), .ctx_nbo(ctx_q.nbo),
    .ctx_ipid_1(ctx_q.ipid_1), .ctx_sn_1(ctx_q.sn_1),
    .ctx_ipid_2(ctx_q.ipid_2), .ctx_sn_2(ctx_q.sn_2),
    .nbo(id_nbo), .rnd(id_rnd), .offset(id_off)
  );

  // ------------------------------------------------------------ RTP pattern
  logic        rtp_start, rtp_busy, rtp_done, rtp_jump;
  logic [31:0] rtp_stride, rtp_offset, rtp_scaled;

  assign rtp_start = (st == S_IPID) && (cls_q.profile == PROFILE_1);

  rohc_rtp_detect u_rtp (
    .clk, .rst_n, .start(rtp_start),
    .hdr_sn(dyn_q.sn), .hdr_ts(dyn_q.ts),
    .ref_sn(ctx_q.dyn.sn), .ref_ts(ctx_q.dyn.ts),
    .ref_stride(ctx_q.ts_stride), .ref_offset(ctx_q.ts_offset),
    .busy(rtp_busy), .done(rtp_done), .ts_jump(rtp_jump),
    .ts_stride(rtp_stride), .ts_offset(rtp_offset), .ts_scaled(rtp_scaled)
  );

  // ------------------------------------------------------------ change flags
  flags_t flags_c;

  rohc_ctx_change u_chg (
    .first(first_q), .nack_in(1'b0), .hdr_stat(stat_q), .hdr_dyn(dyn_q),
    .is_v4(cls_q.is_v4), .rtp(cls_q.profile == PROFILE_1),
    .hdr_nbo(nbo_q), .hdr_rnd(rnd_q), .hdr_ts_jump(jump_q),
    .hdr_ts_stride(stride_q), .hdr_ts_offset(offset_q),
    .ctx(ctx_q), .flags(flags_c)
  );

  // the flags are gathered in two groups and ORed in the bit-packing register
  logic        bp_clear, bp_en;
  logic [31:0] bp_din, bp_dout, bp_left, bp_reg;
  logic [31:0] grp_a, grp_b;

  // group A: context status and inner IP flags; group B: outer IP, UDP, RTP
  assign grp_a = {11'b0, flags_c[FLAGS_W-1:12], 12'b0};
  assign grp_b = {20'b0, flags_c[11:0]};
  assign bp_clear = (st == S_IPID);
  assign bp_en    = (st == S_FLAGS0) || (st == S_FLAGS1);
  assign bp_din   = (st == S_FLAGS0) ? grp_a : grp_b;

  rohc_bitpack u_bp (
    .clk, .rst_n, .clear(bp_clear), .en(bp_en), .din(bp_din),
    .msb(5'd31), .lsb(5'd0), .shift(6'd0), .shift_left(1'b0), .sel_lft_over(1'b0),
    .dout(bp_dout), .left_over(bp_left), .reg_q(bp_reg)
  );

  flags_t flags_acc;
  assign flags_acc = flags_t'(bp_reg[FLAGS_W-1:0]);

  // ------------------------------------------------------------ field selection / state
  flags_t      fs_c, sw_c;
  logic        cs_ir, cs_irdyn, cs_ir_to, cs_fo_to;
  comp_state_t cs_state;
  logic [7:0]  cs_ir_next, cs_fo_next;
  logic        fo_fields;

  rohc_field_select u_fsel (
    .flags(flags_acc), .mode(ctx_q.mode), .win_flags(ctx_q.win_flags),
    .win_cnt(ctx_q.win_cnt), .win_ptr(ctx_q.win_ptr), .fs_flags(fs_c), .sw_flags(sw_c)
  );

  assign fo_fields = |{fs_c.ip_inner, fs_c.ip_outer, fs_c.p, fs_c.x, fs_c.pt, fs_c.tss,
                       fs_c.offset, fs_c.ts_wlsb, fs_c.mt};

  rohc_comp_state u_cstate (
    .stat(fs_c.stat), .dyn(fs_c.dyn), .fo_fields(fo_fields), .mode(ctx_q.mode),
    .ir_cnt(ctx_q.ir_cnt), .fo_cnt(ctx_q.fo_cnt),
    .send_ir(cs_ir), .send_irdyn(cs_irdyn), .ir_timeout(cs_ir_to), .fo_timeout(cs_fo_to),
    .state(cs_state), .ir_cnt_next(cs_ir_next), .fo_cnt_next(cs_fo_next)
  );

  // ------------------------------------------------------------ WLSB
  logic                 wl_start, wl_busy, wl_done;
  field_t               wl_field;
  logic [31:0]          wl_value;
  logic [WIN_SIZE-1:0][31:0] wl_win;
  logic [5:0]           wl_k;

  always_comb begin
    wl_field = FIELD_SN;
    wl_value = {16'b0, dyn_q.sn};
    for (int i = 0; i < WIN_SIZE; i++) wl_win[i] = {16'b0, ctx_q.win_sn[i]};
    if (st == S_WLSB_ID) begin
      wl_field = FIELD_IPID;
      wl_value = {16'b0, ipid_off_q};
      for (int i = 0; i < WIN_SIZE; i++) wl_win[i] = {16'b0, ctx_q.win_ipid_off[i]};
    end else if (st == S_WLSB_TS) begin
      wl_field = FIELD_TS;
      wl_value = fs_q.offset ? dyn_q.ts : scaled_q;
      for (int i = 0; i < WIN_SIZE; i++)
        wl_win[i] = fs_q.offset ? ctx_q.win_ts[i] : ctx_q.win_ts_scaled[i];
    end
  end

  assign wl_start = !wlsb_started && !wl_busy &&
                    ((st == S_WLSB_SN) ||
                     (st == S_WLSB_ID && cls_q.is_v4[1] && !rnd_q) ||
                     (st == S_WLSB_TS && (fs_q.offset || fs_q.ts_wlsb)));

  rohc_wlsb_enc #(.WIN(WIN_SIZE)) u_wlsb (
    .clk, .rst_n, .start(wl_start), .field(wl_field), .value(wl_value),
    .win(wl_win), .cnt(ctx_q.win_cnt), .busy(wl_busy), .done(wl_done), .k(wl_k)
  );

  // ------------------------------------------------------------ packet search
  logic       ps_start, ps_busy, ps_done, ps_found;
  logic [5:0] ps_type, ps_tries;
  logic       need_ext3;

  assign need_ext3 = |{fs_q.ip_inner.tos, fs_q.ip_inner.ttl, fs_q.ip_inner.df,
                       fs_q.ip_inner.nbo, fs_q.ip_inner.rnd,
                       fs_q.ip_outer, fs_q.p, fs_q.x, fs_q.pt, fs_q.tss};
  assign ps_start  = (st == S_SEARCH) && !ps_busy && !ps_done && !wlsb_started;

  rohc_pkt_search u_search (
    .clk, .rst_n, .start(ps_start), .mode(ctx_q.mode), .mode_trans(ctx_q.mode_trans),
    .m_bit(dyn_q.m), .need_ext3(need_ext3),
    .k_sn(k_sn_q), .k_ipid1(k_id_q), .k_ipid2(6'd0), .k_ts(k_ts_q),
    .busy(ps_busy), .done(ps_done), .found(ps_found), .pkt_type(ps_type), .tries(ps_tries)
  );

  // ------------------------------------------------------------ CRC
  pkt_cap_t    cap_q;
  logic [1:0]  crc_w;
  logic [31:0] crc_din;
  logic [7:0]  crc_next;
  logic [6:0]  hdr_len;

  assign cap_q   = pkt_cap(pkt_q);
  assign hdr_len = cls_q.payload_off;

  always_comb begin
    logic [6:0] left;
    left  = hdr_len - crc_pos;
    crc_w = (left >= 7'd4) ? 2'd2 : (left >= 7'd2) ? 2'd1 : 2'd0;
    // little-endian word: the first byte goes in bits 7:0
    crc_din = '0;
    for (int b = 0; b < 4; b++)
      if (32'(crc_pos) + b < HDR_MAX_BYTES) crc_din[8*b +: 8] = hdr_bytes[7'(crc_pos) + 7'(b)];
  end

  rohc_crc_ci u_crc (.crc_type(cap_q.crc), .width(crc_w), .crc_in(crc_q), .din(crc_din),
                     .crc_out(crc_next));

  // ------------------------------------------------------------ context update
  logic                 upd;
  ctx_t                 ctx_new;
  logic [2:0]           wn_cnt [5];
  logic [1:0]           wn_ptr [5];
  logic [WIN_SIZE-1:0][15:0] wn_sn, wn_id;
  logic [WIN_SIZE-1:0][31:0] wn_tss, wn_ts;
  logic [WIN_SIZE-1:0][FLAGS_W-1:0] wn_fl;

  assign upd = cap_q.update;

  rohc_sliding_window #(.N(WIN_SIZE), .W(16)) u_win_sn (
    .win_in(ctx_q.win_sn), .cnt_in(ctx_q.win_cnt), .ptr_in(ctx_q.win_ptr), .push(upd),
    .din(dyn_q.sn), .win_out(wn_sn), .cnt_out(wn_cnt[0]), .ptr_out(wn_ptr[0]));
  rohc_sliding_window #(.N(WIN_SIZE), .W(16)) u_win_id (
    .win_in(ctx_q.win_ipid_off), .cnt_in(ctx_q.win_cnt), .ptr_in(ctx_q.win_ptr), .push(upd),
    .din(ipid_off_q), .win_out(wn_id), .cnt_out(wn_cnt[1]), .ptr_out(wn_ptr[1]));
  rohc_sliding_window #(.N(WIN_SIZE), .W(32)) u_win_tss (
    .win_in(ctx_q.win_ts_scaled), .cnt_in(ctx_q.win_cnt), .ptr_in(ctx_q.win_ptr), .push(upd),
    .din(scaled_q), .win_out(wn_tss), .cnt_out(wn_cnt[2]), .ptr_out(wn_ptr[2]));
  rohc_sliding_window #(.N(WIN_SIZE), .W(32)) u_win_ts (
    .win_in(ctx_q.win_ts), .cnt_in(ctx_q.win_cnt), .ptr_in(ctx_q.win_ptr), .push(upd),
    .din(dyn_q.ts), .win_out(wn_ts), .cnt_out(wn_cnt[3]), .ptr_out(wn_ptr[3]));
  rohc_sliding_window #(.N(WIN_SIZE), .W(FLAGS_W)) u_win_fl (
    .win_in(ctx_q.win_flags), .cnt_in(ctx_q.win_cnt), .ptr_in(ctx_q.win_ptr), .push(upd),
    .din(sw_q), .win_out(wn_fl), .cnt_out(wn_cnt[4]), .ptr_out(wn_ptr[4]));

  always_comb begin
    ctx_new = ctx_q;
    // IP-ID pattern: always refreshed (last two packets)
    ctx_new.ipid_2 = ctx_q.ipid_1;
    ctx_new.sn_2   = ctx_q.sn_1;
    ctx_new.ipid_1 = dyn_q.ip[1].ipid;
    ctx_new.sn_1   = dyn_q.sn;
    ctx_new.nbo    = nbo_q;
    ctx_new.rnd    = rnd_q;
    // the rest only from packets that update the decompressor's context
    if (upd) begin
      ctx_new.dyn           = dyn_q;
      ctx_new.ts_stride     = stride_q;
      ctx_new.ts_offset     = offset_q;
      ctx_new.ts_jump       = jump_q;
      ctx_new.valid         = 1'b1;
      ctx_new.profile       = cls_q.profile;
      ctx_new.ip_stack      = {cls_q.two_levels, cls_q.is_v4};
      ctx_new.stream_id     = cls_q.stream_id;
      ctx_new.stat          = stat_q;
      ctx_new.ir_cnt        = ir_next_q;
      ctx_new.fo_cnt        = fo_next_q;
      ctx_new.win_cnt       = wn_cnt[0];
      ctx_new.win_ptr       = wn_ptr[0];
      ctx_new.win_sn        = wn_sn;
      ctx_new.win_ipid_off  = wn_id;
      ctx_new.win_ts_scaled = wn_tss;
      ctx_new.win_ts        = wn_ts;
      ctx_new.win_flags     = wn_fl;
    end
  end

  // a freshly initialised context
  function automatic ctx_t ctx_init();
    ctx_t c;
    c            = '0;
    c.nbo        = 1'b1;
    c.rnd        = 1'b0;
    c.ts_stride  = 32'd1;
    c.ts_jump    = 1'b1;
    c.mode       = MODE_U;
    c.mode_trans = 1'b0;
    return c;
  endfunction

  // ------------------------------------------------------------ controller
  logic [15:0] uid_q;
  assign busy     = (st != S_IDLE);
  assign ctx_addr = uid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      hdr_q <= '0; len_q <= '0; uid_q <= '0;
      rd_cnt <= '0; wr_cnt <= '0; n_words <= '0;
      ctx_seen <= 1'b0; ctx_q <= '0; first_q <= 1'b0;
      cls_q <= '0; stat_q <= '0; dyn_q <= '0;
      nbo_q <= 1'b1; rnd_q <= 1'b0; ipid_off_q <= '0;
      jump_q <= 1'b0; stride_q <= '0; offset_q <= '0; scaled_q <= '0;
      fs_q <= '0; sw_q <= '0;
      state_q <= ST_IR; ir_next_q <= '0; fo_next_q <= '0;
      k_sn_q <= '0; k_id_q <= '0; k_ts_q <= '0; ts_unscaled_q <= 1'b0;
      pkt_q <= PKT_IR; crc_q <= '0; crc_pos <= '0; wlsb_started <= 1'b0;
      ctx_rd_req <= 1'b0; ctx_wr_req <= 1'b0; ctx_wdata <= '0;
      done <= 1'b0; result <= '0;
    end else begin
      ctx_rd_req <= 1'b0;
      ctx_wr_req <= 1'b0;
      done       <= 1'b0;
      if (ctx_rd_valid && st != S_IDLE && !ctx_seen) begin
        ctx_q    <= ctx_rdata;
        ctx_seen <= 1'b1;
      end
      unique case (st)
        S_IDLE: if (start) begin
          len_q      <= pkt_len;
          uid_q      <= uid;
          hdr_q      <= '0;
          n_words    <= (pkt_len >= 16'(HDR_WORDS * 4)) ? 6'(HDR_WORDS) : 6'((pkt_len + 16'd3) >> 2);
          rd_cnt     <= 6'd1;      // word 0 is being read in this cycle
          wr_cnt     <= '0;
          ctx_seen   <= 1'b0;
          ctx_rd_req <= 1'b1;
          st         <= S_LOAD;
        end
        S_LOAD: begin
          // RAM data of the word addressed in the previous cycle
          if (wr_cnt < n_words)
            for (int b = 0; b < 4; b++) hdr_q[4*int'(wr_cnt) + b] <= ram_rdata[31-8*b -: 8];
          wr_cnt <= wr_cnt + 1'b1;
          rd_cnt <= rd_cnt + 1'b1;
          if (wr_cnt + 1'b1 >= n_words) st <= S_CLASS;
        end
        S_CLASS: begin
          cls_q <= cls_c;
          st    <= S_FETCH;
        end
        S_FETCH: begin
          stat_q <= stat_c;
          dyn_q  <= dyn_c;
          if (cls_q.profile == PROFILE_0) begin
            st <= S_DONE;
          end else if (ctx_seen) begin
            logic fresh;
            fresh = !ctx_q.valid || (ctx_q.profile != cls_q.profile) ||
                    (ctx_q.stream_id != cls_q.stream_id) ||
                    (ctx_q.ip_stack != {cls_q.two_levels, cls_q.is_v4});
            first_q <= fresh;
            if (fresh) begin
              ctx_q   <= ctx_init();
              // profile 2 has no RTP SN: the compressor counts one itself
              if (cls_q.profile == PROFILE_2) dyn_q.sn <= 16'd0;
            end else if (cls_q.profile == PROFILE_2) begin
              dyn_q.sn <= ctx_q.dyn.sn + 16'd1;
            end
            st <= S_IPID;
          end
        end
        S_IPID: begin
          if (cls_q.is_v4[1]) begin
            nbo_q      <= id_nbo;
            rnd_q      <= id_rnd;
            ipid_off_q <= id_off;
          end else begin
            nbo_q      <= 1'b1;
            rnd_q      <= 1'b0;
            ipid_off_q <= '0;
          end
          if (cls_q.profile == PROFILE_1) begin
            st <= S_RTP;
          end else begin
            jump_q   <= 1'b0;
            stride_q <= ctx_q.ts_stride;
            offset_q <= ctx_q.ts_offset;
            scaled_q <= '0;
            st       <= S_FLAGS0;
          end
        end
        S_RTP: if (rtp_done) begin
          jump_q   <= rtp_jump;
          stride_q <= rtp_stride;
          offset_q <= rtp_offset;
          scaled_q <= rtp_scaled;
          st       <= S_FLAGS0;
        end
        S_FLAGS0: st <= S_FLAGS1;
        S_FLAGS1: st <= S_DECIDE;
        S_DECIDE: begin
          fs_q         <= fs_c;
          sw_q         <= sw_c;
          state_q      <= cs_state;
          ir_next_q    <= cs_ir_next;
          fo_next_q    <= cs_fo_next;
          k_sn_q <= '0; k_id_q <= '0; k_ts_q <= '0; ts_unscaled_q <= 1'b0;
          if (cs_ir) begin
            pkt_q <= PKT_IR;
            st    <= S_CRC_INIT;
          end else if (cs_irdyn) begin
            pkt_q <= PKT_IR_DYN;
            st    <= S_CRC_INIT;
          end else begin
            st <= S_WLSB_SN;
          end
          crc_pos      <= '0;
          wlsb_started <= 1'b0;
        end
        S_WLSB_SN: begin
          if (wl_start) wlsb_started <= 1'b1;
          if (wl_done) begin
            k_sn_q       <= wl_k;
            wlsb_started <= 1'b0;
            st           <= S_WLSB_ID;
          end
        end
        S_WLSB_ID: begin
          if (wl_start) wlsb_started <= 1'b1;
          if (!(cls_q.is_v4[1] && !rnd_q)) begin
            k_id_q <= '0;
            st     <= S_WLSB_TS;
          end else if (wl_done) begin
            k_id_q       <= wl_k;
            wlsb_started <= 1'b0;
            st           <= S_WLSB_TS;
          end
        end
        S_WLSB_TS: begin
          if (wl_start) wlsb_started <= 1'b1;
          if (!(fs_q.offset || fs_q.ts_wlsb)) begin
            k_ts_q <= '0;
            st     <= S_SEARCH;
          end else if (wl_done) begin
            k_ts_q        <= wl_k;
            ts_unscaled_q <= fs_q.offset;
            wlsb_started  <= 1'b0;
            st            <= S_SEARCH;
          end
        end
        S_SEARCH: if (ps_done) begin
          pkt_q <= ps_type;
          if (!ps_found) state_q <= ST_FO;
          st <= S_CRC_INIT;
        end
        S_CRC_INIT: begin
          // CRC registers start all ones
          crc_q   <= (cap_q.crc == CRC_3) ? 8'h07 : (cap_q.crc == CRC_7) ? 8'h7f :
                     (cap_q.crc == CRC_8) ? 8'hff : 8'h00;
          crc_pos <= '0;
          st      <= (cap_q.crc == CRC_NONE) ? S_UPDATE : S_CRC;
        end
        S_CRC: begin
          if (crc_pos >= hdr_len) begin
            st <= S_UPDATE;
          end else begin
            crc_q   <= crc_next;
            crc_pos <= crc_pos + ((crc_w == 2'd2) ? 7'd4 : (crc_w == 2'd1) ? 7'd2 : 7'd1);
          end
        end
        S_UPDATE: begin
          ctx_wdata  <= ctx_new;
          ctx_wr_req <= 1'b1;
          st         <= S_DONE;
        end
        S_DONE: if (ctx_seen) begin
          // also a profile 0 packet waits for its context read to finish
          result.profile     <= cls_q.profile;
          result.pkt_type    <= pkt_q;
          result.state       <= state_q;
          result.k_sn        <= k_sn_q;
          result.k_ipid      <= k_id_q;
          result.k_ts        <= k_ts_q;
          result.ts_unscaled <= ts_unscaled_q;
          result.crc_type    <= (cls_q.profile == PROFILE_0) ? CRC_NONE : cap_q.crc;
          result.crc         <= (cls_q.profile == PROFILE_0) ? 8'h00 : crc_q;
          result.ipid_offset <= ipid_off_q;
          result.ts_scaled   <= scaled_q;
          result.fs_flags    <= fs_q;
          done               <= 1'b1;
          st                 <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
