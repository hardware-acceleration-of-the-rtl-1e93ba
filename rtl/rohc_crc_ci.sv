// rohc_crc_ci: CRC accelerator with run-time selected data width and CRC type.
//
// Nine parallel CRC XOR arrays (data widths 8, 16 and 32 bits, each for the
// RoHC CRC-3, CRC-7 and CRC-8 polynomials) see the same operands; a
// multiplexer picks the result for the width and type asked for. A message
// whose length is not a multiple of four bytes is handled by the caller: it
// feeds whole 32-bit words, then one 16-bit and/or one 8-bit step with the
// running CRC fed back to crc_in (mixed data-width CRC). No padding is needed.
//
// Polynomials: CRC-3 1+x+x^3, CRC-7 1+x+x^2+x^3+x^6+x^7, CRC-8 1+x+x^2+x^8.
// The data word is little-endian: din[7:0] is the first byte of the message.
// A CRC narrower than 8 bits uses the low bits of crc_in/crc_out; the unused
// high bits of crc_out are zero.
//
// Interface: width selects 8 (0), 16 (1) or 32 (2) data bits; crc_type as in
// rohc_pkg (CRC_NONE returns 0). Purely combinational: one CRC step per cycle
// when the caller registers crc_out.
//
// Source: the nine XOR arrays selected at run time and the mixed-width
// tail handling follow the reference accelerator; the operand encoding and
// the purely combinational form are this design's choices.
module rohc_crc_ci
  import rohc_pkg::*;
(
  input  crc_type_t   crc_type,
  input  logic [1:0]  width,      // 0: 8 bit, 1: 16 bit, 2/3: 32 bit
  input  logic [7:0]  crc_in,
  input  logic [31:0] din,
  output logic [7:0]  crc_out
);

  logic [2:0] c3_8, c3_16, c3_32;
  logic [6:0] c7_8, c7_16, c7_32;
  logic [7:0] c8_8, c8_16, c8_32;

  rohc_crc_par #(.CRC_W(3), .DATA_W(8),  .POLY(3'b011))     u_c3_8  (.crc_in(crc_in[2:0]), .din(din[7:0]),  .crc_out(c3_8));
  rohc_crc_par #(.CRC_W(3), .DATA_W(16), .POLY(3'b011))     u_c3_16 (.crc_in(crc_in[2:0]), .din(din[15:0]), .crc_out(c3_16));
  rohc_crc_par #(.CRC_W(3), .DATA_W(32), .POLY(3'b011))     u_c3_32 (.crc_in(crc_in[2:0]), .din(din),       .crc_out(c3_32));
  rohc_crc_par #(.CRC_W(7), .DATA_W(8),  .POLY(7'b1001111)) u_c7_8  (.crc_in(crc_in[6:0]), .din(din[7:0]),  .crc_out(c7_8));
  rohc_crc_par #(.CRC_W(7), .DATA_W(16), .POLY(7'b1001111)) u_c7_16 (.crc_in(crc_in[6:0]), .din(din[15:0]), .crc_out(c7_16));
  rohc_crc_par #(.CRC_W(7), .DATA_W(32), .POLY(7'b1001111)) u_c7_32 (.crc_in(crc_in[6:0]), .din(din),       .crc_out(c7_32));
  rohc_crc_par #(.CRC_W(8), .DATA_W(8),  .POLY(8'h07))      u_c8_8  (.crc_in(crc_in),      .din(din[7:0]),  .crc_out(c8_8));
  rohc_crc_par #(.CRC_W(8), .DATA_W(16), .POLY(8'h07))      u_c8_16 (.crc_in(crc_in),      .din(din[15:0]), .crc_out(c8_16));
  rohc_crc_par #(.CRC_W(8), .DATA_W(32), .POLY(8'h07))      u_c8_32 (.crc_in(crc_in),      .din(din),       .crc_out(c8_32));

  always_comb begin
    crc_out = '0;
    unique case (crc_type)
      CRC_3: crc_out = (width == 2'd0) ? {5'b0, c3_8} : (width == 2'd1) ? {5'b0, c3_16} : {5'b0, c3_32};
      CRC_7: crc_out = (width == 2'd0) ? {1'b0, c7_8} : (width == 2'd1) ? {1'b0, c7_16} : {1'b0, c7_32};
      CRC_8: crc_out = (width == 2'd0) ? c8_8 : (width == 2'd1) ? c8_16 : c8_32;
      default: crc_out = '0;
    endcase
  end

endmodule
