// tb_rohc_crc_ci: checks the CRC custom instruction (CRC-3/7/8 over 8, 16 or
// 32 data bits per call) against a bit-serial model.
//
// Random headers of random length are fed the way software would: 32-bit
// calls while four or more bytes are left, then a 16-bit and/or 8-bit call
// for the tail. The final value must equal the bit-serial CRC of the whole
// byte string. CRC type "none" must return zero.
`timescale 1ns/1ps
module tb_rohc_crc_ci;
  import rohc_pkg::*;
  int checks = 0, failures = 0;

  crc_type_t   t;
  logic [1:0]  width;
  logic [7:0]  crc_in, crc_out;
  logic [31:0] din;

  rohc_crc_ci dut (.crc_type(t), .width, .crc_in, .din, .crc_out);

  byte unsigned hdr [100];

  function automatic logic [7:0] serial(crc_type_t ty, int n);
    int w; logic [7:0] poly, c;
    case (ty)
      CRC_3:   begin w = 3; poly = 8'h03; end
      CRC_7:   begin w = 7; poly = 8'h4f; end
      default: begin w = 8; poly = 8'h07; end
    endcase
    c = (8'd1 << w) - 1;
    for (int i = 0; i < n; i++)
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = c[w-1] ^ hdr[i][b];
        c  = (c << 1) & ((8'd1 << w) - 1);
        if (fb) c = c ^ poly;
      end
    return c;
  endfunction

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
    crc_type_t types[3] = '{CRC_3, CRC_7, CRC_8};
    for (int n = 0; n < 600; n++) begin
      int len, pos;
      logic [7:0] c;
      t   = types[n % 3];
      len = 1 + ($urandom % 100);
      for (int i = 0; i < len; i++) hdr[i] = 8'($urandom);
      c   = (t == CRC_3) ? 8'h07 : (t == CRC_7) ? 8'h7f : 8'hff;
      pos = 0;
      while (pos < len) begin
        int left;
        left  = len - pos;
        width = (left >= 4) ? 2'd2 + 2'($urandom % 2) : (left >= 2) ? 2'd1 : 2'd0;
        din   = $urandom;                       // unused bytes must not matter
        for (int b = 0; b < 4; b++) if (pos + b < len) din[8*b +: 8] = hdr[pos + b];
        crc_in = c;
        #1;
        c   = crc_out;
        pos += (width >= 2) ? 4 : (width == 1) ? 2 : 1;
      end
      chk(c == serial(t, len), $sformatf("type %0d length %0d: got %h want %h", t, len, c, serial(t, len)));
    end
    t = CRC_NONE; crc_in = 8'h5a; din = $urandom; width = 2'd2; #1;
    chk(crc_out == 8'h00, "CRC none");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
