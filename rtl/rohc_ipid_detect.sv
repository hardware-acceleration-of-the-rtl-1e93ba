// rohc_ipid_detect: IP-ID behaviour detection and IP-ID offset.
//
// The IPv4 IP-ID is compressed as its offset from the RTP sequence number,
// which only works when it is a counter and in network byte order (NBO).
// The context keeps the NBO/RND flags found last time and the IP-ID and SN of
// the last two packets. The offset of the new packet, swap(ip-id, nbo) - sn,
// is compared with the two reference offsets computed the same way:
//   - equal to either, with the stored NBO:       nbo = context nbo, rnd = 0
//   - otherwise equal with the byte order flipped: nbo = !context nbo, rnd = 0
//   - otherwise the IP-ID is random:               nbo = 1, rnd = 1
// swap(x, nbo) exchanges the two bytes of x when nbo = 0.
// The offset out is computed with the detected byte order.
// Purely combinational.
//
// Source: the comparison order (stored byte order, then flipped, then
// random, with both flags set) follows the reference design; only the inner
// IP level is handled (the caller's choice).
module rohc_ipid_detect (
  input  logic [15:0] hdr_ipid,
  input  logic [15:0] hdr_sn,
  input  logic        ctx_nbo,
  input  logic [15:0] ctx_ipid_1,
  input  logic [15:0] ctx_sn_1,
  input  logic [15:0] ctx_ipid_2,
  input  logic [15:0] ctx_sn_2,
  output logic        nbo,
  output logic        rnd,
  output logic [15:0] offset
);

  function automatic logic [15:0] swap(input logic [15:0] x, input logic n);
    return n ? x : {x[7:0], x[15:8]};
  endfunction

  function automatic logic match(input logic n, input logic [15:0] hi, input logic [15:0] hs,
                                 input logic [15:0] i1, input logic [15:0] s1,
                                 input logic [15:0] i2, input logic [15:0] s2);
    logic [15:0] o, r1, r2;
    o  = swap(hi, n) - hs;
    r1 = swap(i1, n) - s1;
    r2 = swap(i2, n) - s2;
    return (o == r1) || (o == r2);
  endfunction

  always_comb begin
    if (match(ctx_nbo, hdr_ipid, hdr_sn, ctx_ipid_1, ctx_sn_1, ctx_ipid_2, ctx_sn_2)) begin
      nbo = ctx_nbo;
      rnd = 1'b0;
    end else if (match(!ctx_nbo, hdr_ipid, hdr_sn, ctx_ipid_1, ctx_sn_1, ctx_ipid_2, ctx_sn_2)) begin
      nbo = !ctx_nbo;
      rnd = 1'b0;
    end else begin
      nbo = 1'b1;
      rnd = 1'b1;
    end
    offset = swap(hdr_ipid, nbo) - hdr_sn;
  end

endmodule
