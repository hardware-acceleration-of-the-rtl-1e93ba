// rohc_rtp_detect: RTP timestamp pattern detection.
//
// Works out, for the packet's SN and TS against the reference in the context,
// the values the compressor needs to choose how to send the timestamp:
//   expected pattern: TS = ref TS + ref stride and SN = ref SN + 1
//                     (also a retransmission, SN = ref SN); then ts_jump = 0
//                     and the stride is kept.
//   otherwise ts_jump = 1 and the stride is re-estimated as
//                     ts_delta - sn_delta * ref stride, where for packets in
//                     order ts_delta = TS - ref TS, sn_delta = SN - ref SN - 1,
//                     and for packets out of order (SN behind) ts_delta =
//                     2^32 - (TS - ref TS), sn_delta = ref SN - SN - 1.
//   ts_scaled = TS / stride, or TS when the stride is 0 (a video frame sent
//               in several packets),
//   ts_offset = TS when the stride is 0, the context offset when SN differs
//               from the reference SN, and TS mod stride otherwise.
// The division and the modulo come from one run of the shared sequential
// divider (rohc_divider), the only multi-cycle part.
//
// Timing: start is taken when idle; done pulses 35 cycles later with the
// outputs, which stay valid until the next start.
//
// Source: the stride, offset and scaling equations follow the reference
// design; the exact ts_jump test and the zero-stride case are this design's.
// Lint note: rst_n also disables the handshake assertion below.
module rohc_rtp_detect (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] hdr_sn,
  input  logic [31:0] hdr_ts,
  input  logic [15:0] ref_sn,
  input  logic [31:0] ref_ts,
  input  logic [31:0] ref_stride,
  input  logic [31:0] ref_offset,
  output logic        busy,
  output logic        done,
  output logic        ts_jump,
  output logic [31:0] ts_stride,
  output logic [31:0] ts_offset,
  output logic [31:0] ts_scaled
);

  logic        in_order, expected, same_sn;
  logic [31:0] ts_delta, sn_delta, stride_c;
  logic        div_start, div_busy, div_done;
  logic [31:0] quo, rem;
  logic        waiting;
  logic [31:0] ts_q, off_q;
  logic        same_q;

  always_comb begin
    logic [15:0] sn_diff;
    sn_diff  = hdr_sn - ref_sn;
    same_sn  = (sn_diff == 16'd0);
    in_order = !sn_diff[15];
    expected = same_sn || ((hdr_ts == ref_ts + ref_stride) && (sn_diff == 16'd1));
    if (in_order) begin
      ts_delta = hdr_ts - ref_ts;
      sn_delta = 32'(sn_diff) - 32'd1;
    end else begin
      ts_delta = ref_ts - hdr_ts;             // 2^32 - (TS - ref TS)
      sn_delta = 32'(16'(ref_sn - hdr_sn)) - 32'd1;
    end
    stride_c = expected ? ref_stride : ts_delta - sn_delta * ref_stride;
  end

  assign div_start = start && !waiting;

  rohc_divider #(.W(32)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(hdr_ts), .divisor(stride_c),
    .busy(div_busy), .done(div_done), .quotient(quo), .remainder(rem)
  );

  assign busy = waiting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waiting   <= 1'b0;
      done      <= 1'b0;
      ts_jump   <= 1'b0;
      ts_stride <= '0;
      ts_offset <= '0;
      ts_scaled <= '0;
      ts_q      <= '0;
      off_q     <= '0;
      same_q    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (div_start) begin
        waiting   <= 1'b1;
        ts_jump   <= !expected;
        ts_stride <= stride_c;
        ts_q      <= hdr_ts;
        off_q     <= ref_offset;
        same_q    <= same_sn;
      end else if (waiting && div_done) begin
        waiting <= 1'b0;
        done    <= 1'b1;
        if (ts_stride == '0) begin
          ts_scaled <= ts_q;
          ts_offset <= ts_q;
        end else begin
          ts_scaled <= quo;
          ts_offset <= same_q ? rem : off_q;
        end
      end
    end
  end

  // the divider is only started while this unit is idle
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
