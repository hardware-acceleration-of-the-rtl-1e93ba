// rohc_crc_par: parallel CRC generator, one N-bit data word per evaluation.
//
// The block computes crc_out = f(crc_in, din), the state of a CRC shift
// register after all DATA_W data bits have been shifted in. It is purely
// combinational: the loop below is the serial LFSR unrolled DATA_W times, so
// synthesis reduces it to one XOR equation per CRC bit, the sum (modulo 2) of
// a data part (the H1 matrix, crc_in = 0) and a state part (the H2 matrix,
// din = 0). Feeding crc_out back to crc_in over successive words gives the CRC
// of a longer message.
//
// Bit order: data bytes are taken in order of significance, byte 0 =
// din[7:0] first (little-endian words), and each byte least significant bit
// first. The register shifts towards its top bit; POLY holds the coefficients
// of x^0 .. x^(CRC_W-1) of the generator. For CRC-3 (1 + x + x^3) and 8-bit
// data this gives, for example,
//   crc_out[0] = crc_in[2] ^ din[0] ^ din[3] ^ din[4] ^ din[5] ^ din[7].
// The data part of these equations is the one of the CRC-3 example of the
// design; the state part is stated here in this design's own bit naming of
// the register.
//
// Interface: CRC_W-bit crc_in/crc_out, DATA_W-bit din, no clock.
//
// Source: the polynomials and the H1/H2 matrix form follow the reference
// design; the bit order is this design's choice, made so that words chain.
module rohc_crc_par #(
  parameter int unsigned      CRC_W  = 8,
  parameter int unsigned      DATA_W = 8,
  parameter logic [CRC_W-1:0] POLY   = CRC_W'(8'h07)   // 1 + x + x^2 (+ x^8)
) (
  input  logic [CRC_W-1:0]  crc_in,
  input  logic [DATA_W-1:0] din,
  output logic [CRC_W-1:0]  crc_out
);

  always_comb begin
    logic [CRC_W-1:0] c;
    logic             fb;
    c = crc_in;
    for (int i = 0; i < DATA_W; i++) begin
      fb = c[CRC_W-1] ^ din[i];
      c  = {c[CRC_W-2:0], 1'b0} ^ (fb ? POLY : '0);
    end
    crc_out = c;
  end

endmodule
