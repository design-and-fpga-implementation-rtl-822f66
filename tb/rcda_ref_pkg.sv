// rcda_ref_pkg: behavioural reference model and stimulus helpers for the
// deinterleaver testbenches (not synthesizable, testbench use only).
//
// ref_push() applies one PDW to a software copy of the PDW and PRI cluster
// tables with the clustering rules (tolerance windows, moving averages with
// truncation, PRI clusters with occurrence, next/previous links and the last
// PRI pointer). ref_interpret() classifies the resulting PRI clusters and
// returns the expected output beats. The emitter helpers build interleaved
// pulse trains of stable, dwell and stagger emitters, sorted by TOA.
package rcda_ref_pkg;
  import rcda_pkg::*;

  localparam int NPDW = 2**PDW_IDX_W;
  localparam int NPRI = 2**PRI_IDX_W;

  pdw_cluster_t r_pdw [NPDW];
  pri_cluster_t r_pri [NPRI];
  int           r_npdw, r_npri;

  function automatic void ref_reset();
    r_npdw = 0;
    r_npri = 0;
  endfunction

  function automatic bit near(longint a, longint b, longint d);
    longint diff = (a > b) ? a - b : b - a;
    return diff <= d;
  endfunction

  function automatic void ref_push(pdw_t p, rcda_cfg_t cfg);
    int m = 0, hit = 0, lastp, newlast;
    longint pri;
    for (int c = 1; c <= r_npdw && m == 0; c++)
      if (near(p.freq, r_pdw[c].freq, cfg.d_freq) && near(p.pw, r_pdw[c].pw, cfg.d_pw) &&
          near(p.pa, r_pdw[c].pa, cfg.d_pa))
        m = c;
    if (m == 0) begin
      if (r_npdw < NPDW - 1) begin
        r_npdw++;
        r_pdw[r_npdw] = '{freq: p.freq, pw: p.pw, pa: p.pa, toa: p.toa, n: 1, last_pri: 0};
      end
      return;
    end
    pri = longint'(p.toa) - longint'(r_pdw[m].toa);
    if (pri < 0) pri += 64'h1_0000_0000;
    if (pri > (1 << PRI_W) - 1) pri = (1 << PRI_W) - 1;
    for (int c = 1; c <= r_npri && hit == 0; c++)
      if (int'(r_pri[c].pdw_ptr) == m && near(pri, r_pri[c].pri, cfg.d_pri)) hit = c;
    lastp = int'(r_pdw[m].last_pri);
    newlast = lastp;
    if (hit != 0) begin
      if (r_pri[hit].occ != '1) r_pri[hit].occ++;
      newlast = hit;
    end else if (r_npri < NPRI - 1) begin
      r_npri++;
      r_pri[r_npri] = '{pri: PRI_W'(pri), pdw_ptr: PDW_IDX_W'(m), occ: 1, next: 0,
                        prev: PRI_IDX_W'(lastp)};
      newlast = r_npri;
    end
    if (lastp != 0 && newlast != lastp) r_pri[lastp].next = PRI_IDX_W'(newlast);
    begin
      longint n = r_pdw[m].n;
      r_pdw[m].freq = FREQ_W'((n * r_pdw[m].freq + p.freq) / (n + 1));
      r_pdw[m].pw   = PW_W'((n * r_pdw[m].pw + p.pw) / (n + 1));
      r_pdw[m].pa   = PA_W'((n * r_pdw[m].pa + p.pa) / (n + 1));
      r_pdw[m].toa  = p.toa;
      if (r_pdw[m].n != '1) r_pdw[m].n++;
      r_pdw[m].last_pri = PRI_IDX_W'(newlast);
    end
  endfunction

  // ratio small/large >= thr/256 (or > when strict)
  function automatic bit ratio_ok(longint a, longint b, longint thr, bit strict);
    longint lo = (a < b) ? a : b;
    longint hi = (a < b) ? b : a;
    return strict ? (lo * 256 > thr * hi) : (lo * 256 >= thr * hi);
  endfunction

  function automatic void emit(ref radar_beat_t q[$], ref bit rep[NPRI], input int ids[$],
                               input pri_mode_e mode);
    foreach (ids[x]) begin
      radar_beat_t b;
      b.mode  = mode;
      b.level = 4'(ids.size());
      b.pos   = 4'(x);
      b.last  = (x == ids.size() - 1);
      b.pri   = r_pri[ids[x]].pri;
      b.freq  = r_pdw[r_pri[ids[x]].pdw_ptr].freq;
      b.pw    = r_pdw[r_pri[ids[x]].pdw_ptr].pw;
      b.pa    = r_pdw[r_pri[ids[x]].pdw_ptr].pa;
      q.push_back(b);
      rep[ids[x]] = 1;
    end
  endfunction

  function automatic void ref_interpret(rcda_cfg_t cfg, ref radar_beat_t q[$]);
    bit rep [NPRI];
    q.delete();
    foreach (rep[x]) rep[x] = 0;
    for (int i = 1; i <= r_npri; i++) begin
      int ids[$];
      int j;
      if (rep[i]) continue;
      if (r_pri[i].occ < cfg.occ_thr) continue;            // waste data
      ids.push_back(i);
      j = r_pri[i].next;
      if (j == 0 || rep[j]) begin
        emit(q, rep, ids, MODE_STABLE);
        continue;
      end
      if (r_pri[j].occ >= cfg.occ_thr && ratio_ok(r_pri[i].occ, r_pri[j].occ, cfg.stagger_occ, 0)) begin
        // stagger chain
        bit ok = 1, closed = 0;
        longint mn, mx;
        mn = (r_pri[i].occ < r_pri[j].occ) ? r_pri[i].occ : r_pri[j].occ;
        mx = (r_pri[i].occ < r_pri[j].occ) ? r_pri[j].occ : r_pri[i].occ;
        ids.push_back(j);
        if (r_pri[j].next == i) closed = 1;
        else begin
          int c = r_pri[j].next;
          while (ok && !closed) begin
            if (c == 0 || ids.size() >= MAX_LEVEL) begin ok = 0; break; end
            if (r_pri[c].occ < cfg.occ_thr || rep[c]) begin ok = 0; break; end
            foreach (ids[x]) if (ids[x] == c) ok = 0;
            if (!ok) break;
            ids.push_back(c);
            if (r_pri[c].occ < mn) mn = r_pri[c].occ;
            if (r_pri[c].occ > mx) mx = r_pri[c].occ;
            if (r_pri[c].next == i) begin
              closed = 1;
              if (!ratio_ok(mn, mx, cfg.stagger_occ, 0)) ok = 0;
            end else c = r_pri[c].next;
          end
        end
        if (ok && closed) emit(q, rep, ids, MODE_STAGGER);
      end else if (r_pri[j].occ >= cfg.occ_thr && ratio_ok(r_pri[i].occ, r_pri[j].occ, cfg.gap_occ, 1)
                   && r_pri[j].next == i) begin
        ids.push_back(j);
        emit(q, rep, ids, MODE_DWELL);
      end else begin
        emit(q, rep, ids, MODE_STABLE);
      end
    end
  endfunction

  // ------------------------------------------------------------ emitters
  typedef struct {
    pri_mode_e mode;
    int        pris[$];     // stagger: the PRI cycle; dwell: {main, gap}
    int        dwell_len;   // dwell: pulses (main PRIs) per window
    int        freq, pw, pa;
    int        offset;
  } emitter_t;

  typedef struct {
    longint toa;
    pdw_t   pdw;
  } pulse_t;

  // Pulses of one emitter up to time t_end. jit: max +-freq/pw/pa noise.
  // miss_pct: percentage of pulses dropped at random.
  function automatic void gen_emitter(emitter_t e, longint t_end, int jit, int miss_pct,
                                      ref pulse_t ps[$]);
    longint t = e.offset;
    int k = 0;
    while (t < t_end) begin
      if ($urandom_range(0, 99) >= miss_pct) begin
        pulse_t p;
        p.toa = t;
        p.pdw.toa  = TOA_W'(t);
        p.pdw.freq = FREQ_W'(e.freq + ((jit > 0) ? $urandom_range(0, 2*jit) - jit : 0));
        p.pdw.pw   = PW_W'(e.pw + ((jit > 0) ? $urandom_range(0, 2*jit) - jit : 0));
        p.pdw.pa   = PA_W'(e.pa + ((jit > 0) ? $urandom_range(0, 2*jit) - jit : 0));
        ps.push_back(p);
      end
      case (e.mode)
        MODE_STABLE:  t += e.pris[0];
        MODE_STAGGER: t += e.pris[k % e.pris.size()];
        default:      t += ((k % (e.dwell_len + 1)) == e.dwell_len) ? e.pris[1] : e.pris[0];
      endcase
      k++;
    end
  endfunction

  function automatic void sort_pulses(ref pulse_t ps[$]);
    ps.sort() with (item.toa);
  endfunction
endpackage
