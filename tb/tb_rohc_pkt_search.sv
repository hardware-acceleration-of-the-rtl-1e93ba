// tb_rohc_pkt_search: checks the search for the smallest packet type.
//
// For random required bit counts (SN, IP-ID, TS) and random mode, mode
// transition, marker bit and extension-3 conditions, the expected result is
// the first packet type in the capability table (most compact first) that
// the mode allows and whose fields are all wide enough, or IR-DYN when none
// is. The allowed sets are written out here from the table's CRC column:
// R mode uses the R-0/R-1 family and UOR-2 (no CRC-3 packets), U/O mode the
// UO family and UOR-2 (no CRC-less R-0 and no R-0-CRC); a mode transition
// allows only UOR-2 with extension 3; a set marker bit rules out R-0,
// R-0-CRC and UO-0; other changed fields need extension 3.
// The search checks one candidate per cycle; the latency is checked too.
`timescale 1ns/1ps
module tb_rohc_pkt_search;
  import rohc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, mode_trans, m_bit, need_ext3, busy, done, found;
  mode_t mode;
  logic [5:0] k_sn, k_id1, k_id2, k_ts, pkt_type, tries;

  rohc_pkt_search dut (.clk, .rst_n, .start, .mode, .mode_trans, .m_bit, .need_ext3, .k_sn,
                       .k_ipid1(k_id1), .k_ipid2(k_id2), .k_ts, .busy, .done, .found, .pkt_type, .tries);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic bit allowed(int i);
    pkt_cap_t c;
    bit ext3;
    c    = pkt_cap(6'(i));
    ext3 = (i >= 22 && i <= 26) || i == 36 || i == 37;
    if (mode == MODE_R && c.crc == CRC_3) return 0;
    if (mode != MODE_R && (c.crc == CRC_NONE || i == 1)) return 0;
    if (mode_trans && !(ext3 && c.crc == CRC_7 && i != 1)) return 0;
    if (m_bit && (i == 0 || i == 1 || i == 4)) return 0;
    if (need_ext3 && !ext3) return 0;
    return 1;
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode_t modes[3] = '{MODE_U, MODE_O, MODE_R};
    int n_found = 0, n_none = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int e, cand, cyc;
      mode = modes[$urandom % 3];
      mode_trans = ($urandom % 6) == 0;
      m_bit      = ($urandom % 4) == 0;
      need_ext3  = ($urandom % 5) == 0;
      k_sn  = 6'(4 + $urandom % 12);
      k_id1 = ($urandom % 2) ? 6'd0 : 6'($urandom % 14);
      k_id2 = 6'd0;
      k_ts  = ($urandom % 2) ? 6'd0 : 6'($urandom % 32);
      e = PKT_IR_DYN; cand = 0;
      for (int i = 0; i < NUM_PKT; i++) begin
        pkt_cap_t c;
        if (!allowed(i)) continue;
        cand++;
        c = pkt_cap(6'(i));
        if (c.sn >= k_sn && 6'(c.ipid1) >= k_id1 && 6'(c.ipid2) >= k_id2 && c.ts >= k_ts) begin e = i; break; end
      end
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      chk(pkt_type == 6'(e) && found == (e != PKT_IR_DYN),
          $sformatf("mode %0d mt %0d m %0d ext3 %0d k %0d/%0d/%0d: got %0d want %0d", mode, mode_trans,
                    m_bit, need_ext3, k_sn, k_id1, k_ts, pkt_type, e));
      if (e != PKT_IR_DYN) begin
        n_found++;
        chk(tries == 6'(cand), $sformatf("tries %0d want %0d", tries, cand));
      end else n_none++;
      chk(cyc <= NUM_PKT + 3, $sformatf("latency %0d", cyc));
    end
    chk(n_found > 0 && n_none > 0, "both outcomes seen");
    $display("found %0d, IR-DYN %0d", n_found, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
