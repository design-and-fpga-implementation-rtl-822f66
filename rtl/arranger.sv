// arranger: real-time PDW and PRI clustering (first half of the Analyzer).
//
// For every incoming pulse description word (PDW) the Arranger
//   1. scans the PDW clusters in order, one per clock, for the first whose
//      frequency, PW and PA all lie within the operator's delta of the new
//      PDW. No match: the PDW opens a new PDW cluster (n = 1, no last PRI).
//   2. on a match, takes the TOA difference to the cluster's latest pulse as a
//      new PRI, starts the three moving-average units for frequency, PW and
//      PA, and meanwhile scans the PRI clusters for one that points to the
//      same PDW cluster and whose PRI is within delta_pri of the new PRI.
//      Hit: its occurrence count goes up by one. Miss: a new PRI cluster is
//      opened with occurrence 1, next = 0 and previous = the PDW cluster's
//      last PRI cluster.
//   3. links the PDW cluster's previous last PRI cluster to the new or hit
//      one (its next pointer is rewritten), unless they are the same cluster.
//      This closes the loop of a dwell or stagger sequence (gap or last
//      stagger PRI followed by the first PRI again).
//   4. writes the PDW cluster back with the averages, the new TOA, n + 1 and
//      the new last PRI cluster pointer.
//   5. after each pulse checks the end-of-clustering limit (pulse count), and
//      while idle the time limit (clock cycles since the window's first
//      pulse). When it is reached, arranged pulses once, the Arranger halts
//      and waits for interp_done; it then empties both cluster sets and opens a
//      new collection window. PDWs arriving meanwhile queue in the input FIFO.
//
// Steps 1, 2, 4 and 5, the cluster contents, null pointer 0 and the
// occurrence/moving-average rules follow the algorithm. Where its written
// description leaves details open, the following are this design's own: the
// rewriting of the old last cluster's next pointer on a hit (step 3; the
// algorithm states it for a new cluster and needs it on a hit for its loop
// test), first-match scan order, a full cluster memory silently refusing
// new clusters (counted by ev_pdw_full / ev_pri_full), PRI taken modulo 2**TOA_W and
// saturated to PRI_W bits, saturating counters, and clearing both cluster
// sets after each interpretation.
//
// Memory ports are for pdw_cluster_ram / pri_cluster_ram (one-clock read).
// Timing: one clock per PDW cluster scanned, one per PRI cluster scanned, and
// the moving averages take PW_W/4 + 1 clocks in parallel with the PRI scan;
// with two emitters a pulse is fully processed in at most 14 clocks.
module arranger
  import rcda_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  rcda_cfg_t    cfg,
  // PDW input (first-word-fall-through FIFO side)
  input  logic         in_valid,
  input  pdw_t         in_pdw,
  output logic         in_pop,
  // hand-off to the Interpreter
  output logic         arranged,      // one-cycle pulse: limit reached
  output logic         halted,        // clusters frozen for interpretation
  input  logic         interp_done,   // one-cycle pulse: interpretation over
  output pdw_idx_t     pdw_count,
  output pri_idx_t     pri_count,
  output logic         busy,          // a PDW is being processed
  // PDW cluster memory
  output logic         pdw_we,
  output pdw_idx_t     pdw_waddr,
  output pdw_cluster_t pdw_wdata,
  output pdw_idx_t     pdw_raddr,
  input  pdw_cluster_t pdw_rdata,
  // PRI cluster memory
  output logic         pri_we,
  output pri_idx_t     pri_waddr,
  output pri_cluster_t pri_wdata,
  output pri_idx_t     pri_raddr,
  input  pri_cluster_t pri_rdata,
  // event strobes (one cycle each)
  output logic         ev_pdw_new,
  output logic         ev_pdw_match,
  output logic         ev_pdw_full,
  output logic         ev_pri_new,
  output logic         ev_pri_match,
  output logic         ev_pri_full,
  output logic         ev_link,
  output logic         ev_limit_pulses,
  output logic         ev_limit_time
);
  localparam pdw_idx_t PDW_MAX = '1;
  localparam pri_idx_t PRI_MAX = '1;

  typedef enum logic [3:0] {
    S_IDLE, S_PDW_SCAN, S_PDW_NEW, S_PRI_START, S_PRI_SCAN, S_PRI_NEW,
    S_PRI_HIT, S_LINK_RD, S_LINK_WR, S_AVG_WAIT, S_DONE, S_HALT
  } state_e;

  state_e       state;
  pdw_t         p;            // PDW being processed
  pdw_idx_t     pdw_cmp;      // PDW cluster whose word is on pdw_rdata
  pri_idx_t     pri_cmp;      // PRI cluster whose word is on pri_rdata
  pdw_idx_t     m_idx;        // matched PDW cluster
  pdw_cluster_t m_entry;
  logic [PRI_W-1:0] new_pri;
  pri_idx_t     hit_idx;
  pri_cluster_t hit_entry;
  pri_idx_t     new_last;
  pri_idx_t     link_src, link_dst;
  logic [31:0]  pulse_cnt;
  logic [31:0]  timer;
  logic         window_open;

  // ---------------------------------------------------------------- compare
  logic f_in, w_in, a_in, r_in, pdw_match, pri_match;

  tol_window #(.W(FREQ_W)) u_tol_freq (.new_val(p.freq), .ref_val(pdw_rdata.freq), .delta(cfg.d_freq), .in_win(f_in));
  tol_window #(.W(PW_W))   u_tol_pw   (.new_val(p.pw),   .ref_val(pdw_rdata.pw),   .delta(cfg.d_pw),   .in_win(w_in));
  tol_window #(.W(PA_W))   u_tol_pa   (.new_val(p.pa),   .ref_val(pdw_rdata.pa),   .delta(cfg.d_pa),   .in_win(a_in));
  tol_window #(.W(PRI_W))  u_tol_pri  (.new_val(new_pri), .ref_val(pri_rdata.pri), .delta(cfg.d_pri),  .in_win(r_in));

  assign pdw_match = f_in && w_in && a_in;
  assign pri_match = r_in && (pri_rdata.pdw_ptr == m_idx);

  // --------------------------------------------------------- moving average
  logic avg_start;
  logic [2:0] avg_busy;
  logic [FREQ_W-1:0] freq_avg;
  logic [PW_W-1:0]   pw_avg;
  logic [PA_W-1:0]   pa_avg;

  assign avg_start = (state == S_PRI_START);

  moving_avg #(.W(FREQ_W), .N_W(CNT_W)) u_avg_freq (
    .clk, .rst_n, .start(avg_start), .n(m_entry.n), .prev(m_entry.freq), .new_val(p.freq),
    .busy(avg_busy[0]), .done(), .avg(freq_avg));
  moving_avg #(.W(PW_W), .N_W(CNT_W)) u_avg_pw (
    .clk, .rst_n, .start(avg_start), .n(m_entry.n), .prev(m_entry.pw), .new_val(p.pw),
    .busy(avg_busy[1]), .done(), .avg(pw_avg));
  moving_avg #(.W(PA_W), .N_W(CNT_W)) u_avg_pa (
    .clk, .rst_n, .start(avg_start), .n(m_entry.n), .prev(m_entry.pa), .new_val(p.pa),
    .busy(avg_busy[2]), .done(), .avg(pa_avg));

  // new PRI: TOA difference to the cluster's latest pulse, saturated
  logic [TOA_W-1:0] toa_diff;
  assign toa_diff = p.toa - m_entry.toa;

  // ------------------------------------------------------ combinational I/O
  logic limit_time_hit;
  assign limit_time_hit = (cfg.limit_mode == LIMIT_TIME) && window_open && (timer >= cfg.search_limit);

  always_comb begin
    in_pop    = 1'b0;
    pdw_we    = 1'b0;
    pdw_waddr = m_idx;
    pdw_wdata = '0;
    pdw_raddr = pdw_idx_t'(1);
    pri_we    = 1'b0;
    pri_waddr = hit_idx;
    pri_wdata = '0;
    pri_raddr = pri_idx_t'(1);

    unique case (state)
      S_IDLE:     in_pop = in_valid && !limit_time_hit;
      S_PDW_SCAN: pdw_raddr = pdw_cmp + 1'b1;
      S_PDW_NEW: begin
        pdw_we    = (pdw_count != PDW_MAX);
        pdw_waddr = pdw_count + 1'b1;
        pdw_wdata = '{freq: p.freq, pw: p.pw, pa: p.pa, toa: p.toa,
                      n: CNT_W'(1), last_pri: '0};
      end
      S_PRI_SCAN: pri_raddr = pri_cmp + 1'b1;
      S_PRI_NEW: begin
        pri_we    = (pri_count != PRI_MAX);
        pri_waddr = pri_count + 1'b1;
        pri_wdata = '{pri: new_pri, pdw_ptr: m_idx, occ: OCC_W'(1),
                      next: '0, prev: m_entry.last_pri};
      end
      S_PRI_HIT: begin
        pri_we    = 1'b1;
        pri_waddr = hit_idx;
        pri_wdata = hit_entry;
        if (hit_entry.occ != '1) pri_wdata.occ = hit_entry.occ + 1'b1;
      end
      S_LINK_RD:  pri_raddr = link_src;
      S_LINK_WR: begin
        pri_we    = 1'b1;
        pri_waddr = link_src;
        pri_wdata = pri_rdata;
        pri_wdata.next = link_dst;
      end
      S_AVG_WAIT: begin
        pdw_we    = (avg_busy == '0);
        pdw_waddr = m_idx;
        pdw_wdata = '{freq: freq_avg, pw: pw_avg, pa: pa_avg, toa: p.toa,
                      n: (m_entry.n == '1) ? m_entry.n : m_entry.n + 1'b1,
                      last_pri: new_last};
      end
      default: ;
    endcase
  end

  assign busy   = (state != S_IDLE) && (state != S_HALT);
  assign halted = (state == S_HALT);

  // ------------------------------------------------------------ controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      p           <= '0;
      pdw_cmp     <= '0;
      pri_cmp     <= '0;
      m_idx       <= '0;
      m_entry     <= '0;
      new_pri     <= '0;
      hit_idx     <= '0;
      hit_entry   <= '0;
      new_last    <= '0;
      link_src    <= '0;
      link_dst    <= '0;
      pdw_count   <= '0;
      pri_count   <= '0;
      pulse_cnt   <= '0;
      timer       <= '0;
      window_open <= 1'b0;
      arranged    <= 1'b0;
      ev_pdw_new  <= 1'b0;
      ev_pdw_match <= 1'b0;
      ev_pdw_full <= 1'b0;
      ev_pri_new  <= 1'b0;
      ev_pri_match <= 1'b0;
      ev_pri_full <= 1'b0;
      ev_link     <= 1'b0;
      ev_limit_pulses <= 1'b0;
      ev_limit_time   <= 1'b0;
    end else begin
      arranged     <= 1'b0;
      ev_pdw_new   <= 1'b0;
      ev_pdw_match <= 1'b0;
      ev_pdw_full  <= 1'b0;
      ev_pri_new   <= 1'b0;
      ev_pri_match <= 1'b0;
      ev_pri_full  <= 1'b0;
      ev_link      <= 1'b0;
      ev_limit_pulses <= 1'b0;
      ev_limit_time   <= 1'b0;

      if (window_open && state != S_HALT && timer != '1) timer <= timer + 1'b1;

      unique case (state)
        S_IDLE: begin
          if (limit_time_hit) begin
            arranged      <= 1'b1;
            ev_limit_time <= 1'b1;
            state         <= S_HALT;
          end else if (in_valid) begin
            p           <= in_pdw;
            window_open <= 1'b1;
            if (pulse_cnt != '1) pulse_cnt <= pulse_cnt + 1'b1;
            pdw_cmp     <= pdw_idx_t'(1);
            state       <= (pdw_count == '0) ? S_PDW_NEW : S_PDW_SCAN;
          end
        end

        S_PDW_SCAN: begin
          if (pdw_match) begin
            m_idx   <= pdw_cmp;
            m_entry <= pdw_rdata;
            state   <= S_PRI_START;
          end else if (pdw_cmp == pdw_count) begin
            state <= S_PDW_NEW;
          end else begin
            pdw_cmp <= pdw_cmp + 1'b1;
          end
        end

        S_PDW_NEW: begin
          if (pdw_count != PDW_MAX) begin
            pdw_count  <= pdw_count + 1'b1;
            ev_pdw_new <= 1'b1;
          end else begin
            ev_pdw_full <= 1'b1;
          end
          state <= S_DONE;
        end

        S_PRI_START: begin
          ev_pdw_match <= 1'b1;
          new_pri <= (toa_diff > TOA_W'({PRI_W{1'b1}})) ? '1 : toa_diff[PRI_W-1:0];
          pri_cmp <= pri_idx_t'(1);
          state   <= (pri_count == '0) ? S_PRI_NEW : S_PRI_SCAN;
        end

        S_PRI_SCAN: begin
          if (pri_match) begin
            hit_idx   <= pri_cmp;
            hit_entry <= pri_rdata;
            state     <= S_PRI_HIT;
          end else if (pri_cmp == pri_count) begin
            state <= S_PRI_NEW;
          end else begin
            pri_cmp <= pri_cmp + 1'b1;
          end
        end

        S_PRI_NEW: begin
          if (pri_count != PRI_MAX) begin
            pri_count  <= pri_count + 1'b1;
            ev_pri_new <= 1'b1;
            new_last   <= pri_count + 1'b1;
            link_src   <= m_entry.last_pri;
            link_dst   <= pri_count + 1'b1;
            state      <= (m_entry.last_pri != '0) ? S_LINK_RD : S_AVG_WAIT;
          end else begin
            ev_pri_full <= 1'b1;
            new_last    <= m_entry.last_pri;
            state       <= S_AVG_WAIT;
          end
        end

        S_PRI_HIT: begin
          ev_pri_match <= 1'b1;
          new_last     <= hit_idx;
          link_src     <= m_entry.last_pri;
          link_dst     <= hit_idx;
          state        <= (m_entry.last_pri != '0 && m_entry.last_pri != hit_idx)
                          ? S_LINK_RD : S_AVG_WAIT;
        end

        S_LINK_RD: state <= S_LINK_WR;

        S_LINK_WR: begin
          ev_link <= 1'b1;
          state   <= S_AVG_WAIT;
        end

        S_AVG_WAIT: if (avg_busy == '0) state <= S_DONE;

        S_DONE: begin
          if (cfg.limit_mode == LIMIT_PULSES && pulse_cnt >= cfg.search_limit) begin
            arranged        <= 1'b1;
            ev_limit_pulses <= 1'b1;
            state           <= S_HALT;
          end else begin
            state <= S_IDLE;
          end
        end

        S_HALT: begin
          if (interp_done) begin
            pdw_count   <= '0;
            pri_count   <= '0;
            pulse_cnt   <= '0;
            timer       <= '0;
            window_open <= 1'b0;
            state       <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // the moving averages must be finished before the PDW cluster is written back
  a_avg_before_wb: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_AVG_WAIT && pdw_we) |-> (avg_busy == '0));
  // a link never points a cluster at itself
  a_no_self_link: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LINK_WR) |-> (link_src != link_dst && link_src != '0));
endmodule
