// rohc_wlsb_enc: window-based LSB (WLSB) encoder.
//
// The compressor does not know which of its recent reference values the
// decompressor holds, so it keeps a window of up to WIN candidates and sends
// enough bits for every one of them: k = max(g(vref_min, v), g(vref_max, v)),
// g being the single-reference LSB encoder.
//
// Sequence after a start pulse:
//   1. MINMAX: one window entry per cycle (cnt cycles, at most WIN) to find
//      the smallest and largest reference (unsigned compare on the field's
//      width).
//   2. LSB:    one shared LSB encoder evaluates g(vref_min, v), and in the next
//      cycle g(vref_max, v) unless the two references are equal.
//   3. done is high for one cycle with k.
// An empty window (cnt = 0) gives k = field size (16 or 32) after one cycle.
// Latency: cnt + 1 or cnt + 2 cycles from start to done (at most 6).
//
// Interface: start/done handshake, busy while working; window entries are
// sampled when start is high.
//
// Source: the min/max search (at most four cycles) and the two LSB steps
// follow the reference design; the unsigned compare and the empty-window
// result are this design's choices.
module rohc_wlsb_enc
  import rohc_pkg::*;
#(
  parameter int unsigned WIN = WIN_SIZE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  field_t               field,
  input  logic [31:0]          value,
  input  logic [WIN-1:0][31:0] win,
  input  logic [$clog2(WIN+1)-1:0] cnt,
  output logic                 busy,
  output logic                 done,
  output logic [5:0]           k
);

  typedef enum logic [2:0] {S_IDLE, S_MINMAX, S_LSB_MIN, S_LSB_MAX, S_DONE} st_t;
  st_t st;

  field_t                     f_q;
  logic [31:0]                v_q, vmin, vmax;
  logic [WIN-1:0][31:0]       win_q;
  logic [$clog2(WIN+1)-1:0]   cnt_q, idx;
  logic [31:0]                lsb_ref, entry;
  logic [5:0]                 lsb_k, k_min;

  rohc_lsb_enc u_lsb (.value(v_q), .vref(lsb_ref), .field(f_q), .k(lsb_k));

  assign lsb_ref = (st == S_LSB_MAX) ? vmax : vmin;
  assign entry   = (f_q == FIELD_TS) ? win_q[idx[$clog2(WIN)-1:0]] : {16'b0, win_q[idx[$clog2(WIN)-1:0]][15:0]};
  assign busy    = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      done  <= 1'b0;
      k     <= '0;
      f_q   <= FIELD_SN;
      v_q   <= '0;
      vmin  <= '0;
      vmax  <= '0;
      win_q <= '0;
      cnt_q <= '0;
      idx   <= '0;
      k_min <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          f_q   <= field;
          v_q   <= (field == FIELD_TS) ? value : {16'b0, value[15:0]};
          win_q <= win;
          cnt_q <= cnt;
          idx   <= '0;
          vmin  <= '1;
          vmax  <= '0;
          if (cnt == '0) begin
            k    <= (field == FIELD_TS) ? 6'd32 : 6'd16;
            done <= 1'b1;
          end else begin
            st <= S_MINMAX;
          end
        end
        S_MINMAX: begin
          if (entry < vmin) vmin <= entry;
          if (entry > vmax) vmax <= entry;
          idx <= idx + 1'b1;
          if (idx + 1'b1 == cnt_q) st <= S_LSB_MIN;
        end
        S_LSB_MIN: begin
          k_min <= lsb_k;
          if (vmin == vmax) begin
            k    <= lsb_k;
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            st <= S_LSB_MAX;
          end
        end
        S_LSB_MAX: begin
          k    <= (lsb_k > k_min) ? lsb_k : k_min;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
