// tb_rohc_ctx_change: checks detection of header changes against the context.
//
// A random context is built and a header equal to it is derived, then a
// random subset of fields is changed (static fields, TOS/TTL/DF per level,
// IP-ID order/randomness, UDP checksum on/off, RTP P/X/PT, TS stride and
// offset, TS jump). Each flag is compared with a model: a flag is set only
// when its field changed; DF and IP-ID behaviour count only for IPv4
// levels; RTP flags only for profile 1; a PT change counts only between two
// nonzero values; a stride change without a TS jump sets the stride flag.
`timescale 1ns/1ps
module tb_rohc_ctx_change;
  import rohc_pkg::*;
  int checks = 0, failures = 0;
  logic first, nack_in, rtp, hdr_nbo, hdr_rnd, hdr_ts_jump;
  logic [1:0] is_v4;
  static_t hdr_stat;
  dyn_t hdr_dyn;
  logic [31:0] hdr_ts_stride, hdr_ts_offset;
  ctx_t ctx;
  flags_t flags;

  rohc_ctx_change dut (.first, .nack_in, .hdr_stat, .hdr_dyn, .is_v4, .rtp, .hdr_nbo, .hdr_rnd,
                       .hdr_ts_jump, .hdr_ts_stride, .hdr_ts_offset, .ctx, .flags);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      flags_t e;
      bit [15:0] ch;
      ctx = '0;
      ctx.stat = static_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      ctx.dyn  = dyn_t'({$urandom, $urandom, $urandom, $urandom});
      ctx.nbo = 1'($urandom); ctx.rnd = 1'($urandom);
      ctx.ts_stride = $urandom; ctx.ts_offset = $urandom;
      ctx.mode_trans = 1'($urandom);
      if (n % 5 == 0) ctx.dyn.pt = 7'd0;
      if (n % 7 == 0) ctx.dyn.udp_csum = 16'd0;
      hdr_stat = ctx.stat; hdr_dyn = ctx.dyn; hdr_nbo = ctx.nbo; hdr_rnd = ctx.rnd;
      hdr_ts_stride = ctx.ts_stride; hdr_ts_offset = ctx.ts_offset; hdr_ts_jump = 1'b0;
      first = ($urandom % 20) == 0; nack_in = ($urandom % 10) == 0;
      is_v4 = 2'($urandom); rtp = 1'($urandom);
      ch = 16'($urandom) & 16'($urandom);       // about a quarter of the fields change
      if (ch[0])  hdr_stat.dport = hdr_stat.dport + 1;
      if (ch[1])  hdr_dyn.ip[1].tos = ~hdr_dyn.ip[1].tos;
      if (ch[2])  hdr_dyn.ip[1].ttl = hdr_dyn.ip[1].ttl - 1;
      if (ch[3])  hdr_dyn.ip[1].df = ~hdr_dyn.ip[1].df;
      if (ch[4])  hdr_dyn.ip[0].ttl = hdr_dyn.ip[0].ttl + 1;
      if (ch[5])  hdr_dyn.ip[0].df = ~hdr_dyn.ip[0].df;
      if (ch[6])  hdr_nbo = ~hdr_nbo;
      if (ch[7])  hdr_rnd = ~hdr_rnd;
      if (ch[8])  hdr_dyn.udp_csum = (hdr_dyn.udp_csum == 0) ? 16'h1234 : ((n % 2) ? 16'd0 : hdr_dyn.udp_csum + 1);
      if (ch[9])  hdr_dyn.p = ~hdr_dyn.p;
      if (ch[10]) hdr_dyn.x = ~hdr_dyn.x;
      if (ch[11]) hdr_dyn.pt = (n % 3 == 0) ? 7'd0 : hdr_dyn.pt + 1;
      if (ch[12]) hdr_ts_stride = hdr_ts_stride + 160;
      if (ch[13]) hdr_ts_offset = hdr_ts_offset + 1;
      if (ch[14]) hdr_ts_jump = 1'b1;
      if (ch[15]) hdr_dyn.ip[0].tos = ~hdr_dyn.ip[0].tos;
      #1;
      e = '0;
      e.stat = first || ch[0];
      e.dyn  = first;
      e.mt   = ctx.mode_trans;
      e.nack = nack_in;
      e.ip_inner.tos = ch[1]; e.ip_inner.ttl = ch[2]; e.ip_inner.df = ch[3] && is_v4[1];
      e.ip_inner.nbo = ch[6] && is_v4[1]; e.ip_inner.rnd = ch[7] && is_v4[1];
      e.ip_outer.tos = ch[15]; e.ip_outer.ttl = ch[4]; e.ip_outer.df = ch[5] && is_v4[0];
      e.checksum = (hdr_dyn.udp_csum == 0) != (ctx.dyn.udp_csum == 0);
      if (rtp) begin
        e.p = ch[9]; e.x = ch[10];
        e.pt = ch[11] && hdr_dyn.pt != 0 && ctx.dyn.pt != 0 && hdr_dyn.pt != ctx.dyn.pt;
        e.tss = ch[12] && !ch[14];
        e.offset = ch[12] || ch[13];
        e.ts_wlsb = ch[14];
      end
      chk(flags == e, $sformatf("changes %h: flags %h want %h", ch, flags, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
