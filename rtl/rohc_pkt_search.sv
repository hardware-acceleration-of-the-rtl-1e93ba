// rohc_pkt_search: selection of the best compressed packet type.
//
// Two steps after a start pulse:
//  1. Exclusion: the 38-bit disabled_pkt register (one bit per compressed
//     packet type, bit 0 the most compact) is loaded with the masks that
//     apply: packets of the other mode family (R-* in U/O mode, UO-* in R
//     mode), all but the UOR-2 extension-3 packets while a mode transition is
//     pending, packets without room for the RTP marker when M = 1, and all but
//     extension-3 packets when a field only extension 3 carries has to be sent.
//  2. Search: each cycle a least-significant-zero detector picks the first
//     packet still enabled as a one-hot vector, which selects its entry of the
//     packet capability table directly (an OR of the selected rows, no
//     decoder). If the packet carries at least k_sn SN bits, k_ipid1 / k_ipid2
//     IP-ID bits and k_ts TS bits it is chosen; otherwise its bit is set and
//     the search goes on. When none is left, IR-DYN (type 38) is chosen.
//
// Timing: done pulses 2 + (number of packets tried) cycles after start, at
// most 40. pkt_type and found stay valid until the next start.
//
// Source: the disabled_pkt register, the least-significant-zero
// detector and the capability look-up follow the reference design; the
// mask contents are this design's own.
module rohc_pkt_search
  import rohc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mode_t      mode,
  input  logic       mode_trans,
  input  logic       m_bit,
  input  logic       need_ext3,
  input  logic [5:0] k_sn,
  input  logic [5:0] k_ipid1,
  input  logic [5:0] k_ipid2,
  input  logic [5:0] k_ts,
  output logic       busy,
  output logic       done,
  output logic       found,
  output logic [5:0] pkt_type,
  output logic [5:0] tries
);

  logic [NUM_PKT-1:0] disabled_pkt, onehot;
  logic [5:0]         sn_q, id1_q, id2_q, ts_q;
  logic [5:0]         idx;
  pkt_cap_t           cap;
  logic               none_left, fits;

  // least significant zero detector, one-hot output
  assign onehot    = ~disabled_pkt & (disabled_pkt + 1'b1);
  assign none_left = &disabled_pkt;

  // capability look-up addressed by the one-hot vector
  always_comb begin
    cap = '0;
    idx = '0;
    for (int i = 0; i < NUM_PKT; i++) begin
      if (onehot[i]) begin
        cap = cap | pkt_cap(6'(i));
        idx = idx | 6'(i);
      end
    end
    fits = (cap.sn >= sn_q) && (6'(cap.ipid1) >= id1_q) &&
           (6'(cap.ipid2) >= id2_q) && (cap.ts >= ts_q);
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      found        <= 1'b0;
      pkt_type     <= PKT_IR_DYN;
      tries        <= '0;
      disabled_pkt <= '0;
      sn_q <= '0; id1_q <= '0; id2_q <= '0; ts_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          logic [NUM_PKT-1:0] m;
          m = (mode == MODE_R) ? uo_only_mask() : r_only_mask();
          if (mode_trans) m = m | ~(ext3_mask() & uor2_mask());
          if (m_bit)      m = m | NO_MBIT_MASK;
          if (need_ext3)  m = m | ~ext3_mask();
          disabled_pkt <= m;
          sn_q  <= k_sn;
          id1_q <= k_ipid1;
          id2_q <= k_ipid2;
          ts_q  <= k_ts;
          tries <= '0;
          busy  <= 1'b1;
        end
      end else if (none_left) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        found    <= 1'b0;
        pkt_type <= PKT_IR_DYN;
      end else begin
        tries <= tries + 1'b1;
        if (fits) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          found    <= 1'b1;
          pkt_type <= idx;
        end else begin
          disabled_pkt <= disabled_pkt | onehot;
        end
      end
    end
  end

endmodule
