// tb_rohc_comp_state: checks the compressor state decision and the refresh
// counters. Exhaustive over the flag inputs and the three modes, with
// counters swept across the timeout values (IR every 64 packets, IR-DYN every
// 32 in U and O mode, no timeouts in R mode). Then runs a counter sequence of
// 200 quiet packets in U mode and checks that IR and IR-DYN packets come at
// the timeout periods.
`timescale 1ns/1ps
module tb_rohc_comp_state;
  import rohc_pkg::*;
  int checks = 0, failures = 0;
  logic stat, dyn, fo_fields, send_ir, send_irdyn, ir_timeout, fo_timeout;
  mode_t mode;
  logic [7:0] ir_cnt, fo_cnt, ir_next, fo_next;
  comp_state_t state;

  rohc_comp_state dut (.stat, .dyn, .fo_fields, .mode, .ir_cnt, .fo_cnt, .send_ir, .send_irdyn,
                       .ir_timeout, .fo_timeout, .state, .ir_cnt_next(ir_next), .fo_cnt_next(fo_next));

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
    mode_t modes[3] = '{MODE_U, MODE_O, MODE_R};
    int n_ir, n_dyn;
    foreach (modes[mi])
      for (int f = 0; f < 8; f++)
        for (int ic = 60; ic < 66; ic++)
          for (int fc = 28; fc < 34; fc++) begin
            bit eir, edyn, to_ir, to_fo;
            mode = modes[mi]; {stat, dyn, fo_fields} = 3'(f); ir_cnt = 8'(ic); fo_cnt = 8'(fc);
            #1;
            to_ir = (mode != MODE_R) && (ic + 1 >= 64);
            to_fo = (mode != MODE_R) && (fc + 1 >= 32);
            eir   = stat || to_ir;
            edyn  = !eir && (dyn || to_fo);
            chk(ir_timeout == to_ir && fo_timeout == to_fo, "timeouts");
            chk(send_ir == eir && send_irdyn == edyn, "send");
            chk(state == (eir ? ST_IR : edyn ? ST_FO : fo_fields ? ST_FO : ST_SO), "state");
            chk(ir_next == (eir ? 8'd0 : 8'(ic + 1)) && fo_next == ((eir || edyn) ? 8'd0 : 8'(fc + 1)),
                "counters");
          end
    // a quiet U-mode stream
    mode = MODE_U; stat = 1'b0; dyn = 1'b0; fo_fields = 1'b0; ir_cnt = '0; fo_cnt = '0;
    n_ir = 0; n_dyn = 0;
    for (int p = 1; p <= 200; p++) begin
      #1;
      if (send_ir) begin n_ir++; chk(p % 64 == 0, $sformatf("IR at packet %0d", p)); end
      if (send_irdyn) begin n_dyn++; chk(p % 32 == 0 && p % 64 != 0, $sformatf("IR-DYN at packet %0d", p)); end
      ir_cnt = ir_next; fo_cnt = fo_next;
    end
    chk(n_ir == 3 && n_dyn == 3, $sformatf("refresh counts %0d %0d", n_ir, n_dyn));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
