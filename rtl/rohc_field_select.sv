// rohc_field_select: decides which fields must be sent, from the new change
// flags and the flags of earlier packets kept in the context's sliding window.
//
//   U and O mode (optimistic approach): the field-selection (FS) flags are the
//     new flags ORed with the window flags of the last OPT context-updating
//     packets, so every change is sent OPT more times; the sliding-window (SW)
//     flags to store are the new flags unchanged.
//   R mode: SW flags = new flags ORed with the window flags of the last
//     context-updating packet, so a change keeps being sent until feedback
//     acknowledges it; FS flags = SW flags.
// Then: a NACK forces the TS stride to be sent (tss), and a UDP checksum
// change forces an IR-DYN packet (dyn).
// Window entries are addressed from ptr (most recent) backwards; only the cnt
// valid entries take part. Purely combinational.
//
// Source: the optimistic repetition, the NACK and checksum rules follow
// the reference design; the R-mode rule stands in for feedback, which is not
// built.
module rohc_field_select
  import rohc_pkg::*;
#(
  parameter int unsigned OPT = OPTIMISTIC,
  parameter int unsigned N   = WIN_SIZE
) (
  input  flags_t                 flags,
  input  mode_t                  mode,
  input  flags_t [N-1:0]         win_flags,
  input  logic [$clog2(N+1)-1:0] win_cnt,
  input  logic [$clog2(N)-1:0]   win_ptr,
  output flags_t                 fs_flags,
  output flags_t                 sw_flags
);

  always_comb begin
    logic [$clog2(N)-1:0] idx;
    idx      = win_ptr;
    fs_flags = flags;
    sw_flags = flags;
    if (mode == MODE_R) begin
      if (win_cnt != '0) sw_flags = flags | win_flags[win_ptr];
      fs_flags = sw_flags;
    end else begin
      for (int i = 0; i < OPT; i++) begin
        idx = win_ptr - ($clog2(N))'(i);
        if (32'(win_cnt) > i) fs_flags = fs_flags | win_flags[idx];
      end
    end
    if (fs_flags.nack)     fs_flags.tss = 1'b1;
    if (fs_flags.checksum) fs_flags.dyn = 1'b1;
  end

endmodule
