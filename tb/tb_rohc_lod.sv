// tb_rohc_lod: checks the leading-one detector: the position of the highest
// set bit, the input with that bit cleared, and the all-zero flag, for every
// single-bit input and for random inputs.
`timescale 1ns/1ps
module tb_rohc_lod;
  int checks = 0, failures = 0;
  logic [33:0] din, r;
  logic [5:0]  x;
  logic        zero;

  rohc_lod #(.W(34)) dut (.din, .x, .r, .zero);

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
    din = '0; #1;
    chk(zero == 1'b1 && r == '0, "zero input");
    for (int n = 0; n < 4000; n++) begin
      int e;
      if (n < 34) din = 34'd1 << n;
      else        din = {2'($urandom), $urandom} >> ($urandom % 34);
      #1;
      e = -1;
      for (int i = 0; i < 34; i++) if (din[i]) e = i;
      if (e < 0) chk(zero, "zero flag");
      else chk(!zero && x == 6'(e) && r == (din & ~(34'd1 << e)), $sformatf("din=%h x=%0d", din, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
