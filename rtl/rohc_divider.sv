// rohc_divider: sequential unsigned integer divider.
//
// Gives quotient and remainder of a W-bit dividend by a W-bit divisor, used
// for the scaled timestamp (ts / ts_stride) and the timestamp offset
// (ts mod ts_stride). It is one shared, time-multiplexed unit: a
// shift-and-subtract (restoring) loop producing one quotient bit per cycle.
// Division by zero returns an all-ones quotient and the dividend as remainder.
//
// Timing: start is taken when the divider is idle; done pulses W + 1 cycles
// later with the results, which then stay valid until the next start.
//
// Source: the reference design names a shared integer divider; the
// restoring algorithm and the divide-by-zero result are this design's own.
// Lint note: the top bit of the partial remainder is only used in the compare.
module rohc_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  logic [W-1:0]         q, d;
  logic [W:0]           r;
  logic [$clog2(W+1)-1:0] n;
  logic [W:0]           r_sh;

  assign r_sh = {r[W-1:0], q[W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; d <= '0; r <= '0; n <= '0;
      busy <= 1'b0; done <= 1'b0;
      quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q    <= dividend;
          d    <= divisor;
          r    <= '0;
          n    <= ($clog2(W+1))'(W);
          busy <= 1'b1;
        end
      end else if (n != '0) begin
        // one restoring step: shift in the next dividend bit, try to subtract
        if (r_sh >= {1'b0, d}) begin
          r <= r_sh - {1'b0, d};
          q <= {q[W-2:0], 1'b1};
        end else begin
          r <= r_sh;
          q <= {q[W-2:0], 1'b0};
        end
        n <= n - 1'b1;
      end else begin
        busy      <= 1'b0;
        done      <= 1'b1;
        quotient  <= q;
        remainder <= r[W-1:0];
      end
    end
  end

endmodule
