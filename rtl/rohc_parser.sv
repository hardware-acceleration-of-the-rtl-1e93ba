// rohc_parser: splits the classified header into static and dynamic fields.
//
// Given the header bytes and the classifier's offsets it extracts, per IP
// level, the static fields (version, protocol / next header, IPv6 flow label,
// addresses) and the dynamic ones (TOS / traffic class, TTL / hop limit, DF,
// IP-ID), then the UDP ports and checksum and the RTP fields (P, X, M, CC, PT,
// SN, TS, SSRC). Fields are packed into the static_t and dyn_t records of
// rohc_pkg, which play the part of the static and dynamic memory words of the
// packet RAM. Levels that are absent and fields of absent headers are zero.
// Purely combinational.
//
// Source: the field split follows the reference design; extracting all
// fields at once into records is this design's choice. Lint note: only the
// offsets and the level flags of the classifier record are used here.
module rohc_parser
  import rohc_pkg::*;
(
  input  logic [HDR_MAX_BYTES-1:0][7:0] hdr,
  input  cls_t                          cls,
  output static_t                       st,
  output dyn_t                          dy
);

  function automatic void ip_fields(input logic [HDR_MAX_BYTES-1:0][7:0] h, input int o,
                                    output ip_static_t s, output ip_dyn_t d);
    s = '0;
    d = '0;
    s.version = h[o][7:4];
    if (h[o][7:4] == 4'd4) begin
      s.proto  = h[o+9];
      s.saddr  = {96'b0, h[o+12], h[o+13], h[o+14], h[o+15]};
      s.daddr  = {96'b0, h[o+16], h[o+17], h[o+18], h[o+19]};
      d.tos    = h[o+1];
      d.ttl    = h[o+8];
      d.df     = h[o+6][6];
      d.ipid   = {h[o+4], h[o+5]};
    end else begin
      s.proto      = h[o+6];
      s.flow_label = {h[o+1][3:0], h[o+2], h[o+3]};
      for (int i = 0; i < 16; i++) begin
        s.saddr[127-8*i -: 8] = h[o+8+i];
        s.daddr[127-8*i -: 8] = h[o+24+i];
      end
      d.tos = {h[o][3:0], h[o+1][7:4]};
      d.ttl = h[o+7];
    end
  endfunction

  always_comb begin
    int u, r;
    u  = 0;
    r  = 0;
    st = '0;
    dy = '0;
    if (cls.profile != PROFILE_0) begin
      ip_fields(hdr, int'(cls.ip_off_1), st.ip[1], dy.ip[1]);
      if (cls.two_levels) ip_fields(hdr, 0, st.ip[0], dy.ip[0]);
      u = int'(cls.udp_off);
      st.sport    = {hdr[u],   hdr[u+1]};
      st.dport    = {hdr[u+2], hdr[u+3]};
      dy.udp_csum = {hdr[u+6], hdr[u+7]};
      if (cls.profile == PROFILE_1) begin
        r = int'(cls.rtp_off);
        dy.p  = hdr[r][5];
        dy.x  = hdr[r][4];
        dy.cc = hdr[r][3:0];
        dy.m  = hdr[r+1][7];
        dy.pt = hdr[r+1][6:0];
        dy.sn = {hdr[r+2], hdr[r+3]};
        dy.ts = {hdr[r+4], hdr[r+5], hdr[r+6], hdr[r+7]};
        st.ssrc = {hdr[r+8], hdr[r+9], hdr[r+10], hdr[r+11]};
      end
    end
  end

endmodule
