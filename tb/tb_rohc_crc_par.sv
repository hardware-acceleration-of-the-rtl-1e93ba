// tb_rohc_crc_par: checks the one-step parallel CRC against a bit-serial
// shift register.
//
// Five instances cover the three RoHC polynomials (CRC-3, CRC-7, CRC-8) and
// the 16- and 32-bit data widths. Each step is compared with a bit-serial
// model that shifts the data in least significant bit first, byte 0 first.
// Also checks linearity (crc(a^b, d^e) = crc(a,d) ^ crc(b,e)), which is what
// makes the H1/H2 matrix form valid, and the single-bit columns of H1 for
// CRC-3 with 8-bit data.
`timescale 1ns/1ps
module tb_rohc_crc_par;
  int checks = 0, failures = 0;

  logic [2:0]  c3_in, c3_out;
  logic [6:0]  c7_in, c7_out;
  logic [7:0]  c8_in, c8_out, c8w_in, c8w_out, c8h_in, c8h_out;
  logic [7:0]  d8;
  logic [15:0] d16;
  logic [31:0] d32;

  rohc_crc_par #(.CRC_W(3), .DATA_W(8),  .POLY(3'b011))     u3  (.crc_in(c3_in),  .din(d8),  .crc_out(c3_out));
  rohc_crc_par #(.CRC_W(7), .DATA_W(8),  .POLY(7'b1001111)) u7  (.crc_in(c7_in),  .din(d8),  .crc_out(c7_out));
  rohc_crc_par #(.CRC_W(8), .DATA_W(8),  .POLY(8'h07))      u8  (.crc_in(c8_in),  .din(d8),  .crc_out(c8_out));
  rohc_crc_par #(.CRC_W(8), .DATA_W(32), .POLY(8'h07))      u8w (.crc_in(c8w_in), .din(d32), .crc_out(c8w_out));
  rohc_crc_par #(.CRC_W(8), .DATA_W(16), .POLY(8'h07))      u8h (.crc_in(c8h_in), .din(d16), .crc_out(c8h_out));

  function automatic logic [7:0] serial(int w, logic [7:0] poly, logic [7:0] c, logic [31:0] d, int nbits);
    logic [7:0] mask;
    mask = (8'd1 << w) - 1;
    for (int i = 0; i < nbits; i++) begin
      logic fb;
      fb = c[w-1] ^ d[i];
      c  = (c << 1) & mask;
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
    logic [2:0] a3, b3;
    logic [7:0] e8, f8;
    // H1 for CRC-3: crc_in = 0, one data bit at a time, against the serial model
    for (int i = 0; i < 8; i++) begin
      c3_in = '0; d8 = 8'd1 << i; #1;
      chk(c3_out == serial(3, 8'h03, 0, d8, 8), $sformatf("CRC-3 H1 column %0d", i));
    end
    for (int n = 0; n < 3000; n++) begin
      c3_in = 3'($urandom); c7_in = 7'($urandom); c8_in = 8'($urandom);
      c8w_in = 8'($urandom); c8h_in = 8'($urandom);
      d8 = 8'($urandom); d16 = 16'($urandom); d32 = $urandom;
      #1;
      chk(c3_out == 3'(serial(3, 8'h03, 8'(c3_in), 32'(d8), 8)), "CRC-3 8-bit");
      chk(c7_out == 7'(serial(7, 8'h4f, 8'(c7_in), 32'(d8), 8)), "CRC-7 8-bit");
      chk(c8_out == serial(8, 8'h07, c8_in, 32'(d8), 8), "CRC-8 8-bit");
      chk(c8h_out == serial(8, 8'h07, c8h_in, 32'(d16), 16), "CRC-8 16-bit");
      chk(c8w_out == serial(8, 8'h07, c8w_in, d32, 32), "CRC-8 32-bit");
    end
    // linearity of the CRC-3 step
    for (int n = 0; n < 500; n++) begin
      logic [2:0] ca, cb; logic [7:0] da, db;
      ca = 3'($urandom); cb = 3'($urandom); da = 8'($urandom); db = 8'($urandom);
      c3_in = ca; d8 = da; #1; a3 = c3_out;
      c3_in = cb; d8 = db; #1; b3 = c3_out;
      c3_in = ca ^ cb; d8 = da ^ db; #1;
      chk(c3_out == (a3 ^ b3), "CRC-3 linearity");
    end
    // four 8-bit steps equal one 32-bit step
    for (int n = 0; n < 500; n++) begin
      logic [31:0] w; logic [7:0] c0;
      w = $urandom; c0 = 8'($urandom);
      e8 = c0;
      for (int b = 0; b < 4; b++) begin
        c8_in = e8; d8 = w[8*b +: 8]; #1; e8 = c8_out;
      end
      c8w_in = c0; d32 = w; #1; f8 = c8w_out;
      chk(e8 == f8, "4 x 8-bit = 32-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
