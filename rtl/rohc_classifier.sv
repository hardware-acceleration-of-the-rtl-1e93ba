// rohc_classifier: assigns a RoHC profile to an incoming packet.
//
// Looks at the headers in the first HDR_MAX_BYTES bytes of the packet
// (hdr[0] is the first byte on the wire) and its length in bytes:
//   IP level 1 at byte 0: IPv4 (version 4) or IPv6 (version 6). An IPv4 header
//     qualifies only with IHL = 5, MF flag and fragment offset zero. Its
//     protocol / next header is UDP (17), or IPv4/IPv6 in IP (4 / 41) for a
//     tunnel, in which case a second IP level follows and must carry UDP.
//   UDP after the last IP header.
//   RTP after UDP: version 2, second octet (M + PT) not 200 or 201 (RTCP SR
//     and RR), CSRC count zero.
// Every header must fit in len, or its identification fails.
// Profile 1 = RTP/UDP/IP, profile 2 = UDP/IP (also when the RTP checks fail
// or CSRCs are present, since CSRC list compression is not supported),
// profile 0 = anything else. The stream ID is the RTP SSRC for profile 1 and
// the two UDP ports for profile 2.
//
// Outputs also the offsets the later stages need. With one IP level that
// level is reported as the inner one (is_v4[1], ip_off_1 = 0).
// Purely combinational.
//
// Source: the profile rules and acceptance tests (IHL, fragments, length
// checks, RTP version, RTCP second octet, CSRC count) follow the reference
// design; the profile 2 stream ID and the tunnel protocol numbers are this
// design's own.
module rohc_classifier
  import rohc_pkg::*;
(
  input  logic [HDR_MAX_BYTES-1:0][7:0] hdr,
  input  logic [15:0]                   len,
  output cls_t                          cls
);

  localparam logic [7:0] P_UDP  = 8'd17;
  localparam logic [7:0] P_IPV4 = 8'd4;
  localparam logic [7:0] P_IPV6 = 8'd41;

  // IP header check at byte offset off: returns ok, v4, next protocol, size
  function automatic void ip_check(input logic [HDR_MAX_BYTES-1:0][7:0] h,
                                   input int off, input logic [15:0] l,
                                   output logic ok, output logic v4,
                                   output logic [7:0] nxt, output int size);
    logic [3:0] ver;
    ver  = h[off][7:4];
    ok   = 1'b0;
    v4   = 1'b0;
    nxt  = 8'd0;
    size = 0;
    if (ver == 4'd4) begin
      v4   = 1'b1;
      size = 20;
      nxt  = h[off+9];
      ok   = (32'(l) >= 32'(off + 20)) && (h[off][3:0] == 4'd5) &&
             (h[off+6][5] == 1'b0) && (h[off+6][4:0] == 5'd0) && (h[off+7] == 8'd0);
    end else if (ver == 4'd6) begin
      size = 40;
      nxt  = h[off+6];
      ok   = (32'(l) >= 32'(off + 40));
    end
  endfunction

  always_comb begin
    logic       ok0, v40, ok1, v41;
    logic [7:0] nxt0, nxt1;
    int         sz0, sz1, udp, rtp;
    logic       udp_ok, rtp_ok;

    cls = '0;
    cls.profile = PROFILE_0;
    ok1 = 1'b0; v41 = 1'b0; nxt1 = 8'd0; sz1 = 0;
    udp = 0;
    rtp = 0;
    udp_ok = 1'b0;
    rtp_ok = 1'b0;

    ip_check(hdr, 0, len, ok0, v40, nxt0, sz0);
    if (ok0 && (nxt0 == P_IPV4 || nxt0 == P_IPV6) && sz0 < HDR_MAX_BYTES) begin
      // tunnel: a second IP level, whose version must agree with the protocol
      ip_check(hdr, sz0, len, ok1, v41, nxt1, sz1);
      ok1 = ok1 && (v41 == (nxt0 == P_IPV4));
      if (ok1 && nxt1 == P_UDP) begin
        udp    = sz0 + sz1;
        udp_ok = 1'b1;
      end
      cls.two_levels = 1'b1;
      cls.is_v4      = {v41, v40};
      cls.ip_off_1   = 7'(sz0);
    end else if (ok0 && nxt0 == P_UDP) begin
      udp            = sz0;
      udp_ok         = 1'b1;
      cls.is_v4      = {v40, 1'b0};
      cls.ip_off_1   = 7'd0;
    end

    udp_ok = udp_ok && (32'(len) >= 32'(udp + 8));
    if (udp_ok) begin
      rtp = udp + 8;
      cls.profile     = PROFILE_2;
      cls.udp_off     = 7'(udp);
      cls.payload_off = 7'(udp + 8);
      cls.stream_id   = {hdr[udp], hdr[udp+1], hdr[udp+2], hdr[udp+3]};
      rtp_ok = (32'(len) >= 32'(rtp + 12)) && (hdr[rtp][7:6] == 2'd2) &&
               (hdr[rtp+1] != 8'd200) && (hdr[rtp+1] != 8'd201) &&
               (hdr[rtp][3:0] == 4'd0);
      if (rtp_ok) begin
        cls.profile     = PROFILE_1;
        cls.rtp_off     = 7'(rtp);
        cls.payload_off = 7'(rtp + 12);
        cls.stream_id   = {hdr[rtp+8], hdr[rtp+9], hdr[rtp+10], hdr[rtp+11]};
      end
    end
  end

endmodule
