// rohc_sliding_window: next state of one sliding window of the context.
//
// The window is kept like a FIFO: N entries that never move, a counter of
// valid entries and a pointer to the most recent one. A push writes the new
// value one place after the pointer (modulo N), advances the pointer and
// counts up to N; when the window is full the oldest entry is the one
// overwritten. Only the pushed entry and the two administrative fields change,
// so in external memory nothing else has to be rewritten.
//
// Interface: current window (entries, cnt, ptr), push and the new value;
// next window out. Combinational; the caller stores the result.
//
// Source: the FIFO-like update with a counter and pointer follows the
// reference design; starting an empty window at entry 0 is this design's.
module rohc_sliding_window #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0][W-1:0]        win_in,
  input  logic [$clog2(N+1)-1:0]     cnt_in,
  input  logic [$clog2(N)-1:0]       ptr_in,
  input  logic                       push,
  input  logic [W-1:0]               din,
  output logic [N-1:0][W-1:0]        win_out,
  output logic [$clog2(N+1)-1:0]     cnt_out,
  output logic [$clog2(N)-1:0]       ptr_out
);

  always_comb begin
    win_out = win_in;
    cnt_out = cnt_in;
    ptr_out = ptr_in;
    if (push) begin
      // an empty window starts at entry 0
      ptr_out          = (cnt_in == '0) ? '0 : ptr_in + 1'b1;
      win_out[ptr_out] = din;
      cnt_out          = (cnt_in == ($clog2(N+1))'(N)) ? cnt_in : cnt_in + 1'b1;
    end
  end

endmodule
