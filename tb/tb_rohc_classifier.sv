// tb_rohc_classifier: checks the packet classifier on random headers.
//
// Headers of one or two IP levels (IPv4 or IPv6 each), UDP and RTP are built
// with random fields, then some are spoiled: a TCP protocol number, an IPv4
// fragment, an RTP version other than 2, a CSRC count, an RTCP-looking second
// byte, or a packet too short for its headers. Expected profile, level
// flags, offsets and stream identifier are worked out from the description.
`timescale 1ns/1ps
module tb_rohc_classifier;
  import rohc_pkg::*;
  int checks = 0, failures = 0;
  byte unsigned hb[$];
  `include "rohc_tb_hdr.svh"

  logic [HDR_MAX_BYTES-1:0][7:0] hdr;
  logic [15:0] len;
  cls_t cls;

  rohc_classifier dut (.hdr, .len, .cls);

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
    int n_p[3] = '{0, 0, 0};
    for (int n = 0; n < 4000; n++) begin
      hdr_desc_t d;
      int spoil, ipsz, udp;
      profile_t ep;
      d = hb_random();
      spoil = $urandom % 10;
      case (spoil)
        0: d.proto = 8'd6;
        1: begin d.frag = 1'b1; d.v4 = 2'b11; end
        2: d.ver = 2'd1;
        3: d.cc = 4'd2;
        4: begin d.pt = 7'd72; d.m = 1'b1; end          // second byte 200
        default: ;
      endcase
      hb_build(d);
      len = 16'(hb.size());
      if (spoil == 5) len = 16'(10 + $urandom % 30);     // truncated
      hdr = '0;
      for (int i = 0; i < HDR_MAX_BYTES && i < hb.size(); i++) hdr[i] = hb[i];
      #1;
      ipsz = (d.v4[1] ? 20 : 40) + ((d.levels == 2) ? (d.v4[0] ? 20 : 40) : 0);
      udp  = ipsz;
      if (spoil == 0 || spoil == 1 || (spoil == 5 && len < udp + 8)) ep = PROFILE_0;
      else if (spoil >= 2 && spoil <= 4) ep = PROFILE_2;
      else if (spoil == 5 && len < udp + 20) ep = PROFILE_2;
      else ep = PROFILE_1;
      n_p[ep]++;
      chk(cls.profile == ep, $sformatf("case %0d levels %0d v4 %b len %0d: profile %0d want %0d",
          spoil, d.levels, d.v4, len, cls.profile, ep));
      if (ep != PROFILE_0 && cls.profile == ep) begin
        chk(cls.two_levels == (d.levels == 2), "two_levels");
        chk(cls.is_v4[1] == d.v4[1] && (d.levels == 1 || cls.is_v4[0] == d.v4[0]), "is_v4");
        chk(cls.udp_off == 7'(udp), "udp offset");
        chk(cls.ip_off_1 == ((d.levels == 2) ? 7'(d.v4[0] ? 20 : 40) : 7'd0), "inner IP offset");
        if (ep == PROFILE_1)
          chk(cls.rtp_off == 7'(udp + 8) && cls.payload_off == 7'(udp + 20) && cls.stream_id == d.ssrc,
              "RTP offsets / SSRC");
        else
          chk(cls.payload_off == 7'(udp + 8) && cls.stream_id == {d.sport, d.dport}, "UDP offsets / ports");
      end
    end
    chk(n_p[0] > 0 && n_p[1] > 0 && n_p[2] > 0, "all profiles seen");
    $display("profiles 0/1/2: %0d/%0d/%0d", n_p[0], n_p[1], n_p[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
