// tb_rohc_field_select: checks which change flags are sent with a packet.
//
// U/O mode (optimistic approach, 2): the flags of this packet ORed with the
// flags of the last two packets in the window (fewer if the window holds
// fewer). R mode: flags stay set until acknowledged, modelled here as the
// newest window entry ORed in. A NACK forces the TS stride to be sent and a
// UDP checksum change forces the dynamic chain. Random windows, pointers and
// counts against a model.
`timescale 1ns/1ps
module tb_rohc_field_select;
  import rohc_pkg::*;
  int checks = 0, failures = 0;
  flags_t flags, fs, sw;
  flags_t [3:0] win;
  logic [2:0] cnt;
  logic [1:0] ptr;
  mode_t mode;

  rohc_field_select dut (.flags, .mode, .win_flags(win), .win_cnt(cnt), .win_ptr(ptr), .fs_flags(fs), .sw_flags(sw));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic flags_t rnd_flags();
    // sparse random flags
    return flags_t'(FLAGS_W'($urandom) & FLAGS_W'($urandom) & FLAGS_W'($urandom));
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode_t modes[3] = '{MODE_U, MODE_O, MODE_R};
    for (int n = 0; n < 5000; n++) begin
      flags_t e_fs, e_sw;
      mode  = modes[n % 3];
      flags = rnd_flags();
      for (int i = 0; i < 4; i++) win[i] = rnd_flags();
      cnt = 3'($urandom % 5);
      ptr = 2'($urandom);
      e_sw = flags;
      e_fs = flags;
      if (mode == MODE_R) begin
        if (cnt > 0) e_sw = flags | win[ptr];
        e_fs = e_sw;
      end else begin
        if (cnt >= 1) e_fs = e_fs | win[ptr];
        if (cnt >= 2) e_fs = e_fs | win[2'(ptr - 1)];
      end
      if (e_fs.nack) e_fs.tss = 1'b1;
      if (e_fs.checksum) e_fs.dyn = 1'b1;
      #1;
      chk(fs == e_fs && sw == e_sw, $sformatf("mode %0d cnt %0d ptr %0d", mode, cnt, ptr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
