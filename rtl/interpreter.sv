// interpreter: classifies the PRI clusters left by the Arranger into emitters
// with stable, dwell or stagger PRI (second half of the Analyzer).
//
// Started by the Arranger's arranged pulse, it visits the PRI clusters in
// index order. For a cluster i not yet reported:
//   * occurrence < occ_thr: waste data, skipped.
//   * next = 0: a stable-PRI emitter; cluster i alone is reported.
//   * next = j: compares the occurrences of i and j as a ratio
//     r = min(occ_i, occ_j) / max(occ_i, occ_j)
//       r >= stagger_occ                      -> stagger: the chain is followed
//                                               through next pointers until it
//                                               comes back to i;
//       gap_occ < r < stagger_occ and j.next = i -> dwell (main PRI + gap);
//       otherwise (j waste, j already reported, r <= gap_occ, or no loop back)
//                                             -> i is reported as stable.
//   A stagger chain is rejected ("broken", nothing reported) if it meets a null
//   pointer, a waste or already reported cluster, a cluster it already holds,
//   runs past MAX_LEVEL clusters, or if at the end min_occ / max_occ over the
//   whole chain is below stagger_occ.
// Each detected emitter is sent out as one beat per PRI of its chain, each
// carrying the PRI and the averaged frequency, PW and PA of the PDW cluster it
// points to; sequence_found pulses with the final beat. After the last
// cluster, search_ends pulses once.
//
// The decision order, the thresholds (waste data, stagger_occ, gap_occ), the
// loop-back tests and the outputs follow the algorithm. This design's own
// choices, where the algorithm's description leaves details open: ratios computed
// as min/max (so the chain may start at either the main PRI or the gap) and
// compared without division, as occ_small * 256 against threshold * occ_large
// (thresholds are Q0.8 fractions); "valid data" means occurrence >= occ_thr;
// the fall-back to a stable report; the broken-chain rule; the beat format.
//
// Memory ports are read-only, one-clock read latency. Timing: 2 clocks per
// visited cluster, 1 per chain step and 2 per output beat. Output has no
// back-pressure.
module interpreter
  import rcda_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  rcda_cfg_t    cfg,
  input  logic         start,
  input  pri_idx_t     pri_count,
  output logic         busy,
  // PRI and PDW cluster memories (read side)
  output pri_idx_t     pri_raddr,
  input  pri_cluster_t pri_rdata,
  output pdw_idx_t     pdw_raddr,
  input  pdw_cluster_t pdw_rdata,
  // results
  output logic         beat_valid,
  output radar_beat_t  beat,
  output logic         sequence_found,
  output logic         search_ends,
  output logic [PRI_IDX_W-1:0] radar_count,
  // event strobes
  output logic         ev_waste,
  output logic         ev_stable,
  output logic         ev_dwell,
  output logic         ev_stagger,
  output logic         ev_broken
);
  localparam int unsigned NPRI = 2**PRI_IDX_W;
  localparam int unsigned LV_W = $clog2(MAX_LEVEL + 1);
  localparam int unsigned KW   = $clog2(MAX_LEVEL);

  typedef enum logic [2:0] {
    I_IDLE, I_NEXT, I_FIRST, I_SECOND, I_WALK, I_OUT_RD, I_OUT_EMIT, I_END
  } state_e;

  state_e             state;
  logic [PRI_IDX_W:0] i;             // cluster being examined (one bit wider)
  logic [NPRI-1:0]    reported;
  logic [OCC_W-1:0]   first_occ;
  pri_idx_t           cur;
  pri_idx_t           chain_idx [MAX_LEVEL];
  logic [PRI_W-1:0]   chain_pri [MAX_LEVEL];
  pdw_idx_t           chain_pdw [MAX_LEVEL];
  logic [LV_W-1:0]    len;
  logic [KW-1:0]      k;
  logic [OCC_W-1:0]   min_occ, max_occ;
  pri_mode_e          mode;

  pri_idx_t           i_idx;
  assign i_idx = i[PRI_IDX_W-1:0];

  // ---------------------------------------------------------- ratio tests
  // r = occ_lo / occ_hi compared with a Q0.8 threshold: occ_lo*256 vs thr*occ_hi
  function automatic logic ratio_ge(input logic [OCC_W-1:0] occ_lo,
                                    input logic [OCC_W-1:0] occ_hi,
                                    input logic [RATIO_W-1:0] thr);
    return ({occ_lo, 8'h00} >= (OCC_W+8)'(thr) * (OCC_W+8)'(occ_hi));
  endfunction
  function automatic logic ratio_gt(input logic [OCC_W-1:0] occ_lo,
                                    input logic [OCC_W-1:0] occ_hi,
                                    input logic [RATIO_W-1:0] thr);
    return ({occ_lo, 8'h00} > (OCC_W+8)'(thr) * (OCC_W+8)'(occ_hi));
  endfunction

  logic [OCC_W-1:0] pair_min, pair_max, walk_min, walk_max;
  logic             is_valid, pair_stag, pair_gap, in_chain, walk_stag;

  always_comb begin
    is_valid = (pri_rdata.occ >= cfg.occ_thr);
    pair_min = (pri_rdata.occ < first_occ) ? pri_rdata.occ : first_occ;
    pair_max = (pri_rdata.occ < first_occ) ? first_occ : pri_rdata.occ;
    pair_stag = ratio_ge(pair_min, pair_max, cfg.stagger_occ);
    pair_gap  = ratio_gt(pair_min, pair_max, cfg.gap_occ);
    walk_min = (pri_rdata.occ < min_occ) ? pri_rdata.occ : min_occ;
    walk_max = (pri_rdata.occ > max_occ) ? pri_rdata.occ : max_occ;
    walk_stag = ratio_ge(walk_min, walk_max, cfg.stagger_occ);
    in_chain = 1'b0;
    for (int unsigned c = 0; c < MAX_LEVEL; c++)
      if (LV_W'(c) < len && chain_idx[c] == cur) in_chain = 1'b1;
  end

  // ---------------------------------------------------- memory addressing
  always_comb begin
    pri_raddr = i_idx;
    pdw_raddr = chain_pdw[k];
    if (state == I_FIRST || state == I_SECOND || state == I_WALK)
      pri_raddr = pri_rdata.next;
  end

  assign busy = (state != I_IDLE);

  // ------------------------------------------------------------ controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= I_IDLE;
      i              <= '0;
      reported       <= '0;
      first_occ      <= '0;
      cur            <= '0;
      len            <= '0;
      k              <= '0;
      min_occ        <= '0;
      max_occ        <= '0;
      mode           <= MODE_STABLE;
      beat_valid     <= 1'b0;
      beat           <= '0;
      sequence_found <= 1'b0;
      search_ends    <= 1'b0;
      radar_count    <= '0;
      ev_waste       <= 1'b0;
      ev_stable      <= 1'b0;
      ev_dwell       <= 1'b0;
      ev_stagger     <= 1'b0;
      ev_broken      <= 1'b0;
      for (int unsigned c = 0; c < MAX_LEVEL; c++) begin
        chain_idx[c] <= '0;
        chain_pri[c] <= '0;
        chain_pdw[c] <= '0;
      end
    end else begin
      beat_valid     <= 1'b0;
      sequence_found <= 1'b0;
      search_ends    <= 1'b0;
      ev_waste       <= 1'b0;
      ev_stable      <= 1'b0;
      ev_dwell       <= 1'b0;
      ev_stagger     <= 1'b0;
      ev_broken      <= 1'b0;

      unique case (state)
        I_IDLE: begin
          if (start) begin
            reported    <= '0;
            radar_count <= '0;
            i           <= (PRI_IDX_W+1)'(1);
            state       <= I_NEXT;
          end
        end

        // present cluster i on the read port, or skip it
        I_NEXT: begin
          if (i > (PRI_IDX_W+1)'(pri_count)) state <= I_END;
          else if (reported[i_idx])          i <= i + 1'b1;
          else                               state <= I_FIRST;
        end

        // cluster i on pri_rdata; pri_raddr already shows its next cluster
        I_FIRST: begin
          chain_idx[0] <= i_idx;
          chain_pri[0] <= pri_rdata.pri;
          chain_pdw[0] <= pri_rdata.pdw_ptr;
          first_occ    <= pri_rdata.occ;
          min_occ      <= pri_rdata.occ;
          max_occ      <= pri_rdata.occ;
          len          <= LV_W'(1);
          k            <= '0;
          cur          <= pri_rdata.next;
          if (!is_valid) begin
            ev_waste <= 1'b1;
            i        <= i + 1'b1;
            state    <= I_NEXT;
          end else if (pri_rdata.next == '0 || reported[pri_rdata.next]) begin
            mode  <= MODE_STABLE;
            state <= I_OUT_RD;
          end else begin
            state <= I_SECOND;
          end
        end

        // second cluster of the chain on pri_rdata
        I_SECOND: begin
          if (is_valid && pair_stag) begin
            chain_idx[1] <= cur;
            chain_pri[1] <= pri_rdata.pri;
            chain_pdw[1] <= pri_rdata.pdw_ptr;
            len          <= LV_W'(2);
            min_occ      <= pair_min;
            max_occ      <= pair_max;
            mode         <= MODE_STAGGER;
            cur          <= pri_rdata.next;
            if ((PRI_IDX_W+1)'(pri_rdata.next) == i) begin
              state <= I_OUT_RD;
            end else if (pri_rdata.next == '0 || MAX_LEVEL <= 2) begin
              ev_broken <= 1'b1;
              i         <= i + 1'b1;
              state     <= I_NEXT;
            end else begin
              state <= I_WALK;
            end
          end else if (is_valid && pair_gap && (PRI_IDX_W+1)'(pri_rdata.next) == i) begin
            chain_idx[1] <= cur;
            chain_pri[1] <= pri_rdata.pri;
            chain_pdw[1] <= pri_rdata.pdw_ptr;
            len          <= LV_W'(2);
            mode         <= MODE_DWELL;
            state        <= I_OUT_RD;
          end else begin
            mode  <= MODE_STABLE;
            state <= I_OUT_RD;
          end
        end

        // further stagger cluster (index cur) on pri_rdata
        I_WALK: begin
          if (!is_valid || reported[cur] || in_chain) begin
            ev_broken <= 1'b1;
            i         <= i + 1'b1;
            state     <= I_NEXT;
          end else begin
            chain_idx[KW'(len)] <= cur;
            chain_pri[KW'(len)] <= pri_rdata.pri;
            chain_pdw[KW'(len)] <= pri_rdata.pdw_ptr;
            len            <= len + 1'b1;
            min_occ        <= walk_min;
            max_occ        <= walk_max;
            cur            <= pri_rdata.next;
            if ((PRI_IDX_W+1)'(pri_rdata.next) == i) begin
              if (walk_stag) begin
                state <= I_OUT_RD;
              end else begin
                ev_broken <= 1'b1;
                i         <= i + 1'b1;
                state     <= I_NEXT;
              end
            end else if (pri_rdata.next == '0 || len + 1'b1 == LV_W'(MAX_LEVEL)) begin
              ev_broken <= 1'b1;
              i         <= i + 1'b1;
              state     <= I_NEXT;
            end
          end
        end

        // pdw_raddr shows chain_pdw[k]
        I_OUT_RD: state <= I_OUT_EMIT;

        I_OUT_EMIT: begin
          beat_valid <= 1'b1;
          beat       <= '{mode: mode, level: 4'(len), pos: 4'(k),
                          last: (LV_W'(k) + 1'b1 == len), pri: chain_pri[k],
                          freq: pdw_rdata.freq, pw: pdw_rdata.pw, pa: pdw_rdata.pa};
          reported[chain_idx[k]] <= 1'b1;
          if (LV_W'(k) + 1'b1 == len) begin
            sequence_found <= 1'b1;
            radar_count    <= radar_count + 1'b1;
            ev_stable      <= (mode == MODE_STABLE);
            ev_dwell       <= (mode == MODE_DWELL);
            ev_stagger     <= (mode == MODE_STAGGER);
            i              <= i + 1'b1;
            state          <= I_NEXT;
          end else begin
            k     <= k + 1'b1;
            state <= I_OUT_RD;
          end
        end

        I_END: begin
          search_ends <= 1'b1;
          state       <= I_IDLE;
        end

        default: state <= I_IDLE;
      endcase
    end
  end

  a_seq_on_last: assert property (@(posedge clk) disable iff (!rst_n)
    sequence_found |-> (beat_valid && beat.last));
endmodule
