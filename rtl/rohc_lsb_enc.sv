// rohc_lsb_enc: number of least significant bits k needed to LSB-encode a
// field value against one reference value vref.
//
// The interpretation interval is [vref - p, vref + 2^k - 1 - p] (modulo the
// field size), with the shift p = a*2^(k-b) - c chosen per field:
//   SN    : p = 1 while k <= 4, else p = 2^(k-5) - 1   (a,b,c = 1,5,1)
//   IP-ID : p = 0                                      (a,b,c = 0,0,0)
//   TS    : p = 2^(k-2) - 1                            (a,b,c = 1,2,1)
// Two closed forms give k: from the forward distance Rfd of value ahead of
// vref, k1 = ceil(log2(Rfd - c + 1) + b - log2(2^b - a)), and from the backward
// distance Rbk, k2 = ceil(log2(Rbk + c) + b). Only one of them is evaluated:
// k2 when Rbk <= Rbk_max = 2^(kmax-b) - c (and a = 1), otherwise k1.
//
// The logarithms are done without any fractional arithmetic. A leading-one
// detector splits the variable term into 2^X + R1; a small constant table
// gives 2^Y + R2 for the constant term (2^b - a or 2^b). The ceiling is 1
// exactly when R1/2^X > R2/2^Y, decided by shifting the smaller-scale remainder
// by |X - Y| before comparing (the exact remainder comparison); so
//   k1 = X + b - Y + [R1*2^Y > R2*2^X],   k2 = X + Y + [R1 > 0] (Y = b).
//
// SN: k = 4 whenever Rfd <= 14 or Rbk <= 1 (the smallest SN field a packet
// carries); above that the k > 4 branch applies, so k is at least 5. Results
// are limited to kmax = 16 (SN, IP-ID) or 32 (TS). A value equal to vref is
// treated as Rfd = Rbk = 0 (k = 4 for SN, 0 for IP-ID, 2 for TS).
//
// Interface: 32-bit value and vref (16-bit fields in the low half), field
// kind, 6-bit k. Purely combinational (one evaluation per clock cycle).
//
// Source: the closed forms for k1/k2, the p parameters per field, the
// 4-bit SN rule and the exact remainder comparison follow the reference
// design; the wrap-around distances and the clamping are this design's.
module rohc_lsb_enc
  import rohc_pkg::*;
(
  input  logic [31:0] value,
  input  logic [31:0] vref,
  input  field_t      field,
  output logic [5:0]  k
);

  localparam int unsigned NW = 34;

  logic [32:0]   span;        // 2^kmax
  logic [32:0]   r_fd, r_bk;
  logic [32:0]   r_bk_max;
  logic          use_k2;
  logic          sn_short;
  logic [NW-1:0] n1;
  logic [2:0]    b_const;
  logic [2:0]    y;
  logic [3:0]    r2;
  logic [5:0]    x;
  logic [NW-1:0] r1;
  logic          n1_zero;
  logic          frac_gt;
  logic [6:0]    k_raw;
  logic [5:0]    kmax;

  rohc_lod #(.W(NW)) u_lod (.din(n1), .x(x), .r(r1), .zero(n1_zero));

  always_comb begin
    logic [32:0] d;
    // distances on the field's circle
    if (field == FIELD_TS) begin
      span = 33'h1_0000_0000;
      kmax = 6'd32;
      d    = {1'b0, value - vref};
    end else begin
      span = 33'h0_0001_0000;
      kmax = 6'd16;
      d    = {17'b0, value[15:0] - vref[15:0]};
    end
    r_fd = d;
    r_bk = (d == '0) ? '0 : span - d;

    // SN below 5 bits: p = 1 covers [vref-1, vref+14]
    sn_short = (field == FIELD_SN) && ((r_fd <= 33'd14) || (r_bk <= 33'd1));

    // a = 1 fields: b = 5 (SN) or 2 (TS); IP-ID has a = 0, b = 0, c = 0
    b_const  = (field == FIELD_SN) ? 3'd5 : (field == FIELD_TS) ? 3'd2 : 3'd0;
    r_bk_max = (span >> b_const) - 33'd1;
    use_k2   = (field != FIELD_IPID) && (r_bk <= r_bk_max);

    // variable logarithm term 2^X + R1
    if (use_k2)                 n1 = NW'(r_bk) + NW'(1);     // Rbk + c
    else if (field == FIELD_IPID) n1 = NW'(r_fd) + NW'(1);   // Rfd - 0 + 1
    else                        n1 = NW'(r_fd);              // Rfd - 1 + 1

    // constant logarithm term 2^Y + R2 (hard-coded table)
    if (use_k2 || field == FIELD_IPID) begin
      y  = b_const;             // 2^b, exact power of two
      r2 = 4'd0;
    end else if (field == FIELD_SN) begin
      y  = 3'd4;                // 2^5 - 1 = 31 = 2^4 + 15
      r2 = 4'd15;
    end else begin
      y  = 3'd1;                // 2^2 - 1 = 3 = 2^1 + 1
      r2 = 4'd1;
    end

  end

  always_comb begin
    // exact comparison of the two fractional parts
    if (6'(y) <= x) frac_gt = r1 > (NW'(r2) << (x - 6'(y)));
    else            frac_gt = (r1 << (6'(y) - x)) > NW'(r2);

    if (use_k2) k_raw = 7'(x) + 7'(y) + 7'(frac_gt);
    else        k_raw = 7'(x) + 7'(b_const) - 7'(y) + 7'(frac_gt);

    if (sn_short)                                 k = 6'd4;
    else if (!use_k2 && n1_zero)                  k = 6'd0;  // TS equal to vref handled by k2
    else if (k_raw > 7'(kmax))                    k = kmax;
    else if (field == FIELD_SN && k_raw < 7'd5)   k = 6'd5;
    else                                          k = k_raw[5:0];
  end

endmodule
