// rohc_ctx_change: context change detection.
//
// Compares the parsed packet with the reference header and patterns in the
// context and raises one flag per kind of change (flags_t in rohc_pkg):
//   stat      first packet of the stream, or a static field differs
//   dyn       first packet of the stream
//   mt        a mode transition is pending in the context
//   nack      passed through from feedback (always 0 without feedback)
//   per IP level: tos, ttl, df (IPv4 only), and for the inner level nbo and
//             rnd against the context's IP-ID flags
//   checksum  the UDP checksum went from used to unused or back (zero vs.
//             non-zero)
//   p, x      RTP padding / extension bit differs
//   pt        RTP payload type differs and neither value is zero
//   tss       no TS jump and the TS stride differs from the context's
//   offset    TS stride or TS offset differs from the context's: the unscaled
//             TS has to be sent
//   ts_wlsb   a TS jump: the scaled TS has to be sent
// Purely combinational.
//
// Five output bits carry no logic of their own, on purpose: dyn, mt and nack
// copy first, the context's mode-transition bit and the NACK input, and the
// outer level's nbo/rnd are always 0 because only the inner IP-ID is
// tracked (the outer one is sent as it is). They stay in the record so all
// flags travel together through the window and field selection.
//
// Source: the flag list follows the reference design; reading the checksum
// rule as an on/off change of the UDP checksum is this design's choice.
module rohc_ctx_change
  import rohc_pkg::*;
(
  input  logic        first,
  input  logic        nack_in,
  input  static_t     hdr_stat,
  input  dyn_t        hdr_dyn,
  input  logic [1:0]  is_v4,
  input  logic        rtp,           // profile 1
  input  logic        hdr_nbo,
  input  logic        hdr_rnd,
  input  logic        hdr_ts_jump,
  input  logic [31:0] hdr_ts_stride,
  input  logic [31:0] hdr_ts_offset,
  input  ctx_t        ctx,
  output flags_t      flags
);

  always_comb begin
    ip_flags_t f [2];
    flags = '0;
    flags.stat = first || (hdr_stat != ctx.stat);
    flags.dyn  = first;
    flags.mt   = ctx.mode_trans;
    flags.nack = nack_in;
    for (int l = 0; l < 2; l++) begin
      f[l]     = '0;
      f[l].tos = hdr_dyn.ip[l].tos != ctx.dyn.ip[l].tos;
      f[l].ttl = hdr_dyn.ip[l].ttl != ctx.dyn.ip[l].ttl;
      f[l].df  = is_v4[l] && (hdr_dyn.ip[l].df != ctx.dyn.ip[l].df);
    end
    f[1].nbo = is_v4[1] && (hdr_nbo != ctx.nbo);
    f[1].rnd = is_v4[1] && (hdr_rnd != ctx.rnd);
    flags.ip_outer = f[0];
    flags.ip_inner = f[1];
    flags.checksum = (hdr_dyn.udp_csum == 16'd0) != (ctx.dyn.udp_csum == 16'd0);
    if (rtp) begin
      flags.p       = hdr_dyn.p != ctx.dyn.p;
      flags.x       = hdr_dyn.x != ctx.dyn.x;
      flags.pt      = (hdr_dyn.pt != ctx.dyn.pt) && (hdr_dyn.pt != 7'd0) && (ctx.dyn.pt != 7'd0);
      flags.tss     = !hdr_ts_jump && (hdr_ts_stride != ctx.ts_stride);
      flags.offset  = (hdr_ts_stride != ctx.ts_stride) || (hdr_ts_offset != ctx.ts_offset);
      flags.ts_wlsb = hdr_ts_jump;
    end
  end

endmodule
