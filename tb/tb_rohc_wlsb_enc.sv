// tb_rohc_wlsb_enc: checks the window-based LSB encoder.
//
// Random windows of 0..4 reference values are built close to each other
// (no wrap-around inside the window) and a value is placed at a random
// distance. The expected bit count is the largest of the per-reference
// counts from an exhaustive interval search, i.e. the value must decode
// against every reference in the window. An empty window must give the
// full field width. Also checks the busy/done handshake and the latency.
`timescale 1ns/1ps
module tb_rohc_wlsb_enc;
  import rohc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            start = 1'b0;
  field_t          field;
  logic [31:0]     value;
  logic [3:0][31:0] win;
  logic [2:0]      cnt;
  logic            busy, done;
  logic [5:0]      k;

  rohc_wlsb_enc dut (.clk, .rst_n, .start, .field, .value, .win, .cnt, .busy, .done, .k);

  function automatic longint p4(field_t f, int kk);
    if (f == FIELD_IPID) return 0;
    if (f == FIELD_TS)   return (longint'(1) << kk) - 4;
    if (kk <= 4)         return 4;
    return (longint'(1) << (kk - 3)) - 4;
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

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    field_t fl[3] = '{FIELD_SN, FIELD_IPID, FIELD_TS};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      longint base, span, vv;
      int e, cyc, m;
      field = fl[n % 3];
      span  = (field == FIELD_TS) ? 64'h1_0000_0000 : 64'h1_0000;
      cnt   = 3'($urandom % 5);
      base  = (field == FIELD_TS) ? longint'($urandom % 32'hF000_0000) : longint'($urandom % 16'hE000);
      for (int i = 0; i < 4; i++) win[i] = 32'(base + ($urandom % 64));
      m = $urandom % 4;
      vv = (m == 0) ? base + ($urandom % 40) : (m == 1) ? base + 64 + ($urandom % 2000) :
           (m == 2) ? base - ($urandom % 40) : base + ($urandom % 3000000);
      vv = vv % span;
      if (vv < 0) vv += span;
      value = 32'(vv);
      e = 0;
      if (cnt == 0) e = (field == FIELD_TS) ? 32 : 16;
      for (int i = 0; i < cnt; i++) begin
        int ki;
        ki = ref_k(field, vv, (field == FIELD_TS) ? longint'(win[i]) : longint'(win[i][15:0]));
        if (ki > e) e = ki;
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      chk(busy || done, "busy after start");
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
        if (cyc > 20) break;
      end
      chk(done && k == 6'(e), $sformatf("field %0d cnt %0d value %0d: k=%0d want %0d", field, cnt, value, k, e));
      chk(cyc <= 4 + 4, $sformatf("latency %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
