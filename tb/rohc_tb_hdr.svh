// Header builder shared by the classifier and parser testbenches.
// Builds IPv4 / IPv6 / IPv4-in-IPv6 / IPv6-in-IPv4 headers followed by UDP and
// an optional RTP header into the queue hb (network byte order). The
// including module declares: byte unsigned hb[$];
typedef struct {
  int          levels;        // 1 or 2
  bit [1:0]    v4;            // per level, [0] = first (outer)
  bit [7:0]    proto;         // last level's protocol
  bit [31:0]   saddr[2], daddr[2];
  bit [7:0]    tos[2], ttl[2];
  bit [15:0]   ipid[2];
  bit          df[2];
  bit [19:0]   flow;
  bit [15:0]   sport, dport, csum;
  bit          rtp;
  bit [1:0]    ver;
  bit          p, x, m;
  bit [3:0]    cc;
  bit [6:0]    pt;
  bit [15:0]   sn;
  bit [31:0]   ts, ssrc;
  bit          frag;          // set the IPv4 more-fragments bit
} hdr_desc_t;

function automatic void hb16(bit [15:0] v); hb.push_back(v[15:8]); hb.push_back(v[7:0]); endfunction
function automatic void hb32(bit [31:0] v); hb16(v[31:16]); hb16(v[15:0]); endfunction

function automatic void hb_ip(hdr_desc_t d, int l, bit [7:0] nxt);
  if (d.v4[l]) begin
    hb.push_back(8'h45); hb.push_back(d.tos[l]); hb16(16'd0); hb16(d.ipid[l]);
    hb.push_back({1'b0, d.df[l], d.frag, 5'b0}); hb.push_back(8'h00);
    hb.push_back(d.ttl[l]); hb.push_back(nxt); hb16(16'h0);
    hb32(d.saddr[l]); hb32(d.daddr[l]);
  end else begin
    hb32({4'h6, d.tos[l], d.flow}); hb16(16'd0); hb.push_back(nxt); hb.push_back(d.ttl[l]);
    hb32(32'h20010db8); hb32(32'h0); hb32(32'h0); hb32(d.saddr[l]);
    hb32(32'h20010db8); hb32(32'h0); hb32(32'h1); hb32(d.daddr[l]);
  end
endfunction

function automatic hdr_desc_t hb_random();
  hdr_desc_t d;
  d.levels = 1 + ($urandom % 2);
  d.v4     = 2'($urandom);
  d.proto  = 8'd17;
  for (int l = 0; l < 2; l++) begin
    d.saddr[l] = $urandom; d.daddr[l] = $urandom; d.tos[l] = 8'($urandom);
    d.ttl[l] = 8'($urandom); d.ipid[l] = 16'($urandom); d.df[l] = 1'($urandom);
  end
  d.flow = 20'($urandom);
  d.sport = 16'($urandom); d.dport = 16'($urandom); d.csum = 16'($urandom);
  d.rtp = 1'b1; d.ver = 2'd2; d.p = 1'($urandom); d.x = 1'($urandom); d.m = 1'($urandom);
  d.cc = 4'd0; d.pt = 7'($urandom); d.sn = 16'($urandom); d.ts = $urandom; d.ssrc = $urandom;
  if (d.pt == 7'd72 || d.pt == 7'd73) d.pt = 7'd0;  // second byte 200/201 is RTCP
  d.frag = 1'b0;
  return d;
endfunction

function automatic void hb_build(hdr_desc_t d);
  hb.delete();
  if (d.levels == 2) begin
    hb_ip(d, 0, d.v4[1] ? 8'd4 : 8'd41);
    hb_ip(d, 1, d.proto);
  end else hb_ip(d, 1, d.proto);   // a single level is described by index 1
  hb16(d.sport); hb16(d.dport); hb16(16'd100); hb16(d.csum);
  if (d.rtp) begin
    hb.push_back({d.ver, d.p, d.x, d.cc}); hb.push_back({d.m, d.pt});
    hb16(d.sn); hb32(d.ts); hb32(d.ssrc);
  end
  for (int i = 0; i < 20; i++) hb.push_back(8'($urandom));   // payload
endfunction
