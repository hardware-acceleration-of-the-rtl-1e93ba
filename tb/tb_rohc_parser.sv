// tb_rohc_parser: checks field extraction on random one- and two-level
// IPv4/IPv6 + UDP + RTP headers. The classifier result is built by the test
// from the header description, and every static and dynamic field the parser
// outputs is compared with the value put into the header.
`timescale 1ns/1ps
module tb_rohc_parser;
  import rohc_pkg::*;
  int checks = 0, failures = 0;
  byte unsigned hb[$];
  `include "rohc_tb_hdr.svh"

  logic [HDR_MAX_BYTES-1:0][7:0] hdr;
  cls_t    cls;
  static_t st;
  dyn_t    dy;

  rohc_parser dut (.hdr, .cls, .st, .dy);

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
    for (int n = 0; n < 3000; n++) begin
      hdr_desc_t d;
      int o1, udp;
      d = hb_random();
      d.rtp = (n % 4) != 0;
      hb_build(d);
      hdr = '0;
      for (int i = 0; i < HDR_MAX_BYTES && i < hb.size(); i++) hdr[i] = hb[i];
      o1  = (d.levels == 2) ? (d.v4[0] ? 20 : 40) : 0;
      udp = o1 + (d.v4[1] ? 20 : 40);
      cls = '0;
      cls.profile    = d.rtp ? PROFILE_1 : PROFILE_2;
      cls.two_levels = (d.levels == 2);
      cls.is_v4      = {d.v4[1], (d.levels == 2) ? d.v4[0] : 1'b0};
      cls.ip_off_1   = 7'(o1);
      cls.udp_off    = 7'(udp);
      cls.rtp_off    = 7'(udp + 8);
      #1;
      for (int l = 0; l < 2; l++) begin
        if (l == 0 && d.levels == 1) begin
          chk(st.ip[0] == '0 && dy.ip[0] == '0, "absent level is zero");
          continue;
        end
        chk(st.ip[l].version == (d.v4[l] ? 4'd4 : 4'd6), "version");
        chk(st.ip[l].saddr[31:0] == d.saddr[l] && st.ip[l].daddr[31:0] == d.daddr[l], "addresses");
        chk(dy.ip[l].tos == d.tos[l] && dy.ip[l].ttl == d.ttl[l], "tos/ttl");
        if (d.v4[l]) chk(dy.ip[l].ipid == d.ipid[l] && dy.ip[l].df == d.df[l], "ipid/df");
        else         chk(st.ip[l].flow_label == d.flow && st.ip[l].saddr[127:96] == 32'h20010db8, "flow label");
      end
      chk(st.ip[1].proto == d.proto, "protocol");
      chk(st.sport == d.sport && st.dport == d.dport && dy.udp_csum == d.csum, "UDP");
      if (d.rtp)
        chk(dy.p == d.p && dy.x == d.x && dy.m == d.m && dy.cc == d.cc && dy.pt == d.pt &&
            dy.sn == d.sn && dy.ts == d.ts && st.ssrc == d.ssrc, "RTP");
      else
        chk(dy.sn == '0 && dy.ts == '0 && st.ssrc == '0, "no RTP fields for profile 2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
