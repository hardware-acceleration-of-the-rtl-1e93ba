// rohc_bitpack: bit-packing unit (mask, shift, concatenate in one cycle).
//
// Used to cut bit fields out of 32-bit memory words and pack them without
// gaps, and (with shift 0) to OR together results of several comparisons.
// Datapath, all in one cycle:
//   mask     = bits lsb..msb set, built from two one-hot decoders:
//              (onehot(msb) - onehot(lsb)) | onehot(msb)
//   masked   = din & mask
//   barrel   = 64-bit shift of masked by shift; right shifts (shift_left = 0)
//              move the field down from the top of the word, and the bits
//              pushed out below bit 0 come out, top-aligned, as left_over;
//              left shifts push bits out above bit 31 into left_over's low end
//   packed   = shifted | reg           (the concatenation, also dout)
//   reg     <= sel_lft_over ? left_over : packed     when en
// So the packed word is available in the same cycle, and when a field does not
// fit, the register keeps the bits that spilled over for the next word.
//
// Interface: clear has priority over en and empties the register.
//
// Source: the unit (decoders for the field limits, mask, barrel shifter,
// register with a left-over path) follows the reference design's bit-packing
// hardware; the subtraction form of the mask and the 64-bit shifter are this
// design's choices. Timing: combinational outputs, reg_q updates on the clock.
module rohc_bitpack (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [31:0] din,
  input  logic [4:0]  msb,
  input  logic [4:0]  lsb,
  input  logic [5:0]  shift,
  input  logic        shift_left,
  input  logic        sel_lft_over,
  output logic [31:0] dout,
  output logic [31:0] left_over,
  output logic [31:0] reg_q
);

  logic [31:0] oh_msb, oh_lsb, mask, masked, shifted;
  logic [63:0] barrel;

  always_comb begin
    oh_msb  = 32'd1 << msb;
    oh_lsb  = 32'd1 << lsb;
    mask    = (oh_msb - oh_lsb) | oh_msb;
    masked  = din & mask;
    if (shift_left) begin
      barrel    = {32'b0, masked} << shift;
      shifted   = barrel[31:0];
      left_over = barrel[63:32];
    end else begin
      barrel    = {masked, 32'b0} >> shift;
      shifted   = barrel[63:32];
      left_over = barrel[31:0];
    end
    dout = shifted | reg_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     reg_q <= '0;
    else if (clear) reg_q <= '0;
    else if (en)    reg_q <= sel_lft_over ? left_over : dout;
  end

endmodule
