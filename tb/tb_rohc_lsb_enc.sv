// tb_rohc_lsb_enc: checks the LSB encoder against an exhaustive search.
//
// For each value/reference pair the reference model tries k = 0,1,2,... and
// returns the first k whose interpretation interval [vref-p, vref+2^k-1-p]
// holds the value, with p evaluated exactly (scaled by 4, since p can be a
// fraction of 1/4 for small k). SN results are at least 4 bits. Covers
// directed distances around every branch point and random pairs.
`timescale 1ns/1ps
module tb_rohc_lsb_enc;
  import rohc_pkg::*;

  logic [31:0] value, vref;
  field_t      field;
  logic [5:0]  k;
  int checks = 0, failures = 0;

  rohc_lsb_enc dut (.value(value), .vref(vref), .field(field), .k(k));

  // 4*p for field f and bit count kk
  function automatic longint p4(field_t f, int kk);
    if (f == FIELD_IPID) return 0;
    if (f == FIELD_TS)   return (longint'(1) << kk) - 4;      // 4*(2^(k-2)-1)
    if (kk <= 4)         return 4;                            // SN, p = 1
    return (longint'(1) << (kk - 3)) - 4;                     // 4*(2^(k-5)-1)
  endfunction

  function automatic int ref_k(field_t f, longint v, longint r);
    int     kmax;
    longint span, d, b;
    kmax = (f == FIELD_TS) ? 32 : 16;
    span = longint'(1) << kmax;
    d    = (v - r) % span;
    if (d < 0) d += span;
    b    = (d == 0) ? 0 : span - d;
    for (int kk = (f == FIELD_SN ? 4 : 0); kk <= kmax; kk++) begin
      longint pp, hi;
      pp = p4(f, kk);
      hi = 4 * ((longint'(1) << kk) - 1) - pp;
      if (4 * d <= hi && 4 * d >= -pp) return kk;
      if (d == 0 && pp >= 0 && hi >= 0) return kk;
      if (b != 0 && 4 * b <= pp) return kk;
    end
    return kmax;
  endfunction

  task automatic check(field_t f, longint v, longint r);
    int e;
    field = f;
    value = 32'(v);
    vref  = 32'(r);
    #1;
    e = ref_k(f, (f == FIELD_TS) ? longint'(value) : longint'(value[15:0]),
                 (f == FIELD_TS) ? longint'(vref)  : longint'(vref[15:0]));
    checks++;
    if (k !== 6'(e)) begin
      failures++;
      if (failures < 20)
        $display("MISMATCH field=%0d value=%0d vref=%0d k=%0d expected=%0d", f, value, vref, k, e);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    field_t fl[3] = '{FIELD_SN, FIELD_IPID, FIELD_TS};
    // the worked example of the exact remainder comparison: Rfd - c + 1 = 1058, TS-like a=1,b=5 is SN
    check(FIELD_SN, 1000 + 1058, 1000);
    foreach (fl[j]) begin
      for (int dd = -300; dd <= 300; dd++) check(fl[j], 40000 + dd, 40000);
      for (int e = 0; e < 32; e++) begin
        for (int t = -2; t <= 2; t++) begin
          check(fl[j], 5 + (longint'(1) << e) + t, 5);
          check(fl[j], 5 - (longint'(1) << e) + t, 5);
        end
      end
      for (int n = 0; n < 3000; n++) check(fl[j], $urandom, $urandom);
      for (int n = 0; n < 3000; n++) check(fl[j], 1000, 1000 + ($urandom % 64) - 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
