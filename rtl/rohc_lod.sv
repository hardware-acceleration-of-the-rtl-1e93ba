// rohc_lod: leading-one detector, the integer part of log2.
//
// For a non-zero input N = 2^X + R (0 <= R < 2^X) it returns the position X
// of the most significant set bit and the remainder R, the input with that bit
// cleared. A zero input gives X = 0, R = 0 and zero = 1. Combinational, a
// priority search from the top bit.
//
// Source: the split into position and remainder follows the reference LSB
// encoder's leading-one detector; the loop form is this design's own.
// Interface: W-bit din; x, r and zero. No clock.
module rohc_lod #(
  parameter int unsigned W = 34
) (
  input  logic [W-1:0]         din,
  output logic [$clog2(W)-1:0] x,
  output logic [W-1:0]         r,
  output logic                 zero
);

  always_comb begin
    x    = '0;
    zero = 1'b1;
    for (int i = 0; i < W; i++) begin
      if (din[i]) begin
        x    = ($clog2(W))'(i);
        zero = 1'b0;
      end
    end
    r = din & ~(W'(1) << x);
  end

endmodule
