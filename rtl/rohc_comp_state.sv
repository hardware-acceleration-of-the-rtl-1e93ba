// rohc_comp_state: compressor state and initialisation-packet decision.
//
// The compressor is in one of three states: IR (sending the whole header),
// FO (sending dynamic changes) and SO (optimal compression). With the
// optimistic approach done by field selection, the state for each packet
// follows from the FS flags and two timeout counters kept in the context:
//   stat flag, or IR timeout (U/O mode)      -> IR packet, state IR,
//                                               both counters restart
//   dyn flag,  or FO timeout (U/O mode)      -> IR-DYN packet, state FO,
//                                               FO counter restarts
//   otherwise a compressed packet; state FO if some non-SN field still has
//   to be sent (fo_fields), else SO; both counters count the packet.
// A timeout fires on the packet that makes the counter reach its limit, so
// in a steady stream every IR_TO-th packet is an IR and every FO_TO-th an
// IR-DYN. In R mode the timeouts are off. Purely combinational; the caller
// writes the next counter values back to the context.
//
// Source: the states, the timeout values (64 and 32 packets) and the
// IR / IR-DYN triggers follow the reference design; which packets count and
// that R mode has no timeouts are this design's choices.
module rohc_comp_state
  import rohc_pkg::*;
#(
  parameter int unsigned IR_TO = IR_TIMEOUT,
  parameter int unsigned FO_TO = FO_TIMEOUT
) (
  input  logic        stat,
  input  logic        dyn,
  input  logic        fo_fields,
  input  mode_t       mode,
  input  logic [7:0]  ir_cnt,
  input  logic [7:0]  fo_cnt,
  output logic        send_ir,
  output logic        send_irdyn,
  output logic        ir_timeout,
  output logic        fo_timeout,
  output comp_state_t state,
  output logic [7:0]  ir_cnt_next,
  output logic [7:0]  fo_cnt_next
);

  always_comb begin
    ir_timeout  = (mode != MODE_R) && (32'(ir_cnt) + 1 >= IR_TO);
    fo_timeout  = (mode != MODE_R) && (32'(fo_cnt) + 1 >= FO_TO);
    send_ir     = 1'b0;
    send_irdyn  = 1'b0;
    ir_cnt_next = ir_cnt + 8'd1;
    fo_cnt_next = fo_cnt + 8'd1;
    if (stat || ir_timeout) begin
      send_ir     = 1'b1;
      state       = ST_IR;
      ir_cnt_next = '0;
      fo_cnt_next = '0;
    end else if (dyn || fo_timeout) begin
      send_irdyn  = 1'b1;
      state       = ST_FO;
      fo_cnt_next = '0;
    end else begin
      state = fo_fields ? ST_FO : ST_SO;
    end
  end

endmodule
