// tb_rohc_rtp_detect: checks RTP timestamp stride detection and scaling.
//
// The reference is the previous packet's SN, TS, stride and offset. Cases:
// the expected next packet (SN + 1, TS + stride), the same SN again, a gap
// of several packets, a packet from the past (out of order), a stride change
// and a stride of zero. Expected jump flag, stride, scaled TS (TS / stride),
// and offset (TS mod stride when the SN repeats, otherwise kept) come from
// a model written with the simulator's arithmetic. Also checks busy/done.
`timescale 1ns/1ps
module tb_rohc_rtp_detect;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done, ts_jump;
  logic [15:0] hdr_sn, ref_sn;
  logic [31:0] hdr_ts, ref_ts, ref_stride, ref_offset, ts_stride, ts_offset, ts_scaled;

  rohc_rtp_detect dut (.clk, .rst_n, .start, .hdr_sn, .hdr_ts, .ref_sn, .ref_ts, .ref_stride, .ref_offset,
                       .busy, .done, .ts_jump, .ts_stride, .ts_offset, .ts_scaled);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_kind[6] = '{0, 0, 0, 0, 0, 0};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1200; n++) begin
      int kind, cyc;
      logic [15:0] g;
      logic [31:0] e_stride, e_scaled, e_off;
      bit e_jump;
      kind       = n % 6;
      ref_sn     = 16'($urandom);
      ref_ts     = $urandom;
      ref_stride = 32'(160 * (1 + $urandom % 4));
      ref_offset = $urandom % ref_stride;
      g          = 16'(2 + $urandom % 50);
      case (kind)
        0: begin hdr_sn = ref_sn + 1; hdr_ts = ref_ts + ref_stride; end
        1: begin hdr_sn = ref_sn;     hdr_ts = ref_ts + ref_stride * ($urandom % 3); end
        2: begin hdr_sn = ref_sn + g; hdr_ts = ref_ts + ref_stride * g; end
        3: begin hdr_sn = ref_sn - g; hdr_ts = ref_ts - ref_stride * g; end
        4: begin hdr_sn = ref_sn + 1; hdr_ts = ref_ts + 240; end
        default: begin hdr_sn = ref_sn + g; hdr_ts = ref_ts + ref_stride * (g - 1); end  // stride 0
      endcase
      // model
      e_jump = !(hdr_sn == ref_sn || (hdr_sn == ref_sn + 1 && hdr_ts == ref_ts + ref_stride));
      if (!e_jump) e_stride = ref_stride;
      else if (16'(hdr_sn - ref_sn) < 16'h8000)
        e_stride = (hdr_ts - ref_ts) - 32'(16'(hdr_sn - ref_sn) - 1) * ref_stride;
      else
        e_stride = (ref_ts - hdr_ts) - 32'(16'(ref_sn - hdr_sn) - 1) * ref_stride;
      if (e_stride == 0) begin e_scaled = hdr_ts; e_off = hdr_ts; end
      else begin
        e_scaled = hdr_ts / e_stride;
        e_off    = (hdr_sn == ref_sn) ? hdr_ts % e_stride : ref_offset;
      end
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      chk(busy, "busy after start");
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      chk(done && !busy, "done");
      chk(ts_jump == e_jump && ts_stride == e_stride && ts_scaled == e_scaled && ts_offset == e_off,
          $sformatf("kind %0d: jump %0d/%0d stride %0d/%0d scaled %0d/%0d off %0d/%0d", kind,
                    ts_jump, e_jump, ts_stride, e_stride, ts_scaled, e_scaled, ts_offset, e_off));
      if (kind == 5) chk(e_stride == 0, "stride-zero case");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
