// tb_rohc_bitpack: checks the bit-packing unit in its two uses.
//  1. Packing: random fields of 1..32 bits are cut from the top of 32-bit
//     words (mask lsb..31, right shift by the current fill level) and packed
//     back to back. Every word that fills up is compared with the same bits
//     taken from a bit-queue model; spilled bits must carry over through the
//     left-over path.
//  2. Random single operations (both shift directions) against a direct
//     model of mask, shift, left-over and concatenation.
`timescale 1ns/1ps
module tb_rohc_bitpack;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 1'b0, en = 1'b0, shift_left = 1'b0, sel_lft_over = 1'b0;
  logic [31:0] din = '0, dout, left_over, reg_q;
  logic [4:0] msb = '0, lsb = '0;
  logic [5:0] shift = '0;

  rohc_bitpack dut (.clk, .rst_n, .clear, .en, .din, .msb, .lsb, .shift, .shift_left, .sel_lft_over,
                    .dout, .left_over, .reg_q);

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
    bit bits [$];
    int pos, wi;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- 1. packing
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    pos = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] v;
      wi = 1 + ($urandom % 32);
      v  = $urandom;
      for (int b = 0; b < wi; b++) bits.push_back(v[31 - b]);
      din = v; msb = 5'd31; lsb = 5'(32 - wi); shift = 6'(pos); shift_left = 1'b0;
      en = 1'b1;
      sel_lft_over = (pos + wi >= 32);
      #1;
      if (pos + wi >= 32) begin
        logic [31:0] e;
        for (int b = 0; b < 32; b++) e[31 - b] = bits.pop_front();
        chk(dout == e, $sformatf("packed word %h want %h", dout, e));
        pos = pos + wi - 32;
      end else pos = pos + wi;
      @(negedge clk);
      en = 1'b0;
    end
    // ---- 2. single operations
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] m, mk, sh, lo, r0;
      logic [63:0] br;
      logic [4:0] a, b;
      a = 5'($urandom); b = 5'($urandom);
      msb = (a > b) ? a : b; lsb = (a > b) ? b : a;
      din = $urandom; shift = 6'($urandom % 33); shift_left = 1'($urandom);
      en = 1'b1; sel_lft_over = 1'($urandom); clear = (($urandom % 10) == 0);
      #1;
      mk = '0;
      for (int i = 0; i < 32; i++) if (i >= lsb && i <= msb) mk[i] = 1'b1;
      m = din & mk;
      if (shift_left) begin br = {32'b0, m} << shift; sh = br[31:0]; lo = br[63:32]; end
      else            begin br = {m, 32'b0} >> shift; sh = br[63:32]; lo = br[31:0]; end
      r0 = reg_q;
      chk(dout == (sh | r0) && left_over == lo, "operation");
      @(negedge clk);
      chk(reg_q == (clear ? 32'h0 : sel_lft_over ? lo : (sh | r0)), "register update");
      clear = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
