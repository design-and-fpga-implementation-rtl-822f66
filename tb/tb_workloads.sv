// tb_workloads: success-rate runs of the Analyzer at its default parameters
// over the environments this algorithm is evaluated with:
//   * 1, 3, 5 and 8 emitters x jitter/noise 0, 2, 5 % x missing pulses
//     2, 5, 10 % (36 environments),
//   * one emitter with jitter/noise 0..16 % and no missing pulses,
//   * one emitter with 0..12 % missing pulses and no jitter,
//   * 59 emitters with neither, and 20 emitters with moderate jitter and loss.
// Each trial draws emitters of random mode (stable, dwell with 5..15 pulses
// per dwell, stagger of level 2..4), random PRIs and distinct PDW parameters,
// generates their interleaved pulse trains and plays them into the Analyzer
// as one pulse-count-limited window. PDWs are offered as fast as the input
// FIFO takes them (no PDW is lost), so the outcome depends on the algorithm
// only, not on the pulse rate.
//
// Noise model: PDW parameters vary uniformly by +-j % of their mid-scale
// value (freq 30000, PW and PA 1000 codes) and each interval by +-j % of a
// 10000-tick reference PRI. The deltas follow the noise (2x its amplitude plus
// a margin) and emitters are spaced so that their clusters cannot meet.
//
// Checks: every window's beats equal the reference model's; no PDW is lost;
// clean environments (no jitter, no loss) find every emitter. The success rate
// (emitters found with the right mode, PRIs and frequency, over emitters
// generated) and the number of extra reports are printed per environment.
module tb_workloads;
  import rcda_pkg::*;
  import rcda_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  rcda_cfg_t cfg;
  logic pdw_valid = 0;
  pdw_t pdw;
  logic [15:0] pdw_dropped;
  logic pdw_fifo_full, arranger_busy, arranged, interpreting;
  pdw_idx_t pdw_clusters;
  pri_idx_t pri_clusters, radar_count;
  logic radar_valid, sequence_found, search_ends;
  radar_beat_t radar;
  logic [13:0] events;

  analyzer dut (.clk, .rst_n, .cfg, .pdw_valid, .pdw, .pdw_dropped, .pdw_fifo_full,
                .arranger_busy, .arranged, .interpreting, .pdw_clusters, .pri_clusters,
                .radar_valid, .radar, .sequence_found, .search_ends, .radar_count, .events);

  always #5 clk = ~clk;

  radar_beat_t got[$];
  int gen_mode [3], hit_mode [3];     // per PRI mode, environments with loss or noise
  bit tally;
  always @(posedge clk) if (rst_n && radar_valid) got.push_back(radar);

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  localparam int REF_PRI = 10000;

  // draw n emitters for jitter j %
  function automatic void draw(int n, int j, ref emitter_t es[$]);
    int a_f = j * 300, a_p = j * 10, a_pri = j * REF_PRI / 100;
    int step_f = (6 * a_f + 8 > 64) ? 6 * a_f + 8 : 64;
    int step_p = (6 * a_p + 8 > 16) ? 6 * a_p + 8 : 16;
    int nf = 55000 / step_f, np = 1500 / step_p;
    int s = 6 * a_pri + 200;       // spacing of PRIs within one emitter
    es.delete();
    for (int r = 0; r < n; r++) begin
      emitter_t e;
      int m, base;
      e.freq = 5000 + (r % nf) * step_f;
      e.pw   = 500 + ((r / nf) % np) * step_p;
      e.pa   = 500 + (r / (nf * np)) * step_p;
      e.offset = $urandom_range(0, 20000);
      base = $urandom_range(3000, 6000);
      m = $urandom_range(0, 2);
      e.pris.delete();
      if (m == 0) begin
        e.mode = MODE_STABLE;
        e.pris.push_back(base);
        e.dwell_len = 0;
      end else if (m == 1) begin
        e.mode = MODE_DWELL;
        e.pris.push_back(base);
        e.pris.push_back(base * 3 + s);
        e.dwell_len = $urandom_range(5, 15);
      end else begin
        int lvl;
        lvl = $urandom_range(2, 4);
        e.mode = MODE_STAGGER;
        for (int k = 0; k < lvl; k++) e.pris.push_back(base + k * s);
        e.dwell_len = 0;
      end
      es.push_back(e);
    end
  endfunction

  function automatic int noisy(int v, int a);
    return (a > 0) ? v + $urandom_range(0, 2 * a) - a : v;
  endfunction

  // pulse train of one emitter with PDW noise a_f/a_p and PRI jitter a_pri
  function automatic void train(emitter_t e, longint t_end, int j, int miss, ref pulse_t ps[$]);
    longint t = e.offset;
    int k = 0;
    int a_f = j * 300, a_p = j * 10, a_pri = j * REF_PRI / 100;
    while (t < t_end) begin
      int pri;
      if ($urandom_range(0, 99) >= miss) begin
        pulse_t p;
        p.toa = t;
        p.pdw.toa  = TOA_W'(t);
        p.pdw.freq = FREQ_W'(noisy(e.freq, a_f));
        p.pdw.pw   = PW_W'(noisy(e.pw, a_p));
        p.pdw.pa   = PA_W'(noisy(e.pa, a_p));
        ps.push_back(p);
      end
      case (e.mode)
        MODE_STABLE:  pri = e.pris[0];
        MODE_STAGGER: pri = e.pris[k % e.pris.size()];
        default:      pri = ((k % (e.dwell_len + 1)) == e.dwell_len) ? e.pris[1] : e.pris[0];
      endcase
      t += noisy(pri, a_pri);
      k++;
    end
  endfunction

  function automatic bit found(emitter_t e);
    int want[$];
    if (e.mode == MODE_DWELL) want = '{e.pris[0], e.pris[1]};
    else want = e.pris;
    foreach (got[x])
      if (got[x].pos == 0 && got[x].mode == e.mode && int'(got[x].level) == want.size() &&
          near(got[x].freq, e.freq, cfg.d_freq) && x + want.size() <= got.size())
        for (int r = 0; r < want.size(); r++) begin
          bit ok = 1;
          for (int k = 0; k < want.size(); k++)
            if (!near(got[x + k].pri, want[(r + k) % want.size()], cfg.d_pri)) ok = 0;
          if (ok) return 1;
        end
    return 0;
  endfunction

  // one trial; returns emitters found and extra reports
  task automatic trial(int n, int j, int miss, output int n_found, output int n_extra);
    emitter_t es[$];
    pulse_t ps[$];
    radar_beat_t expq[$];
    longint t_end = 0;
    int drops0 = int'(pdw_dropped);
    draw(n, j, es);
    foreach (es[r]) begin
      longint cyc = 0;
      foreach (es[r].pris[k]) cyc += es[r].pris[k];
      if (es[r].mode == MODE_DWELL) cyc = es[r].pris[0] * es[r].dwell_len + es[r].pris[1];
      if (cyc * 6 > t_end) t_end = cyc * 6;         // at least 6 dwells / cycles
      if (es[r].pris[0] * 40 > t_end) t_end = es[r].pris[0] * 40;
    end
    t_end += 20000;
    foreach (es[r]) train(es[r], t_end, j, miss, ps);
    sort_pulses(ps);
    cfg.d_freq = 16'(2 * j * 300 + 4);
    cfg.d_pw   = 16'(2 * j * 10 + 4);
    cfg.d_pa   = 16'(2 * j * 10 + 4);
    cfg.d_pri  = 24'(2 * j * REF_PRI / 100 + 8);
    cfg.search_limit = ps.size();
    got.delete();
    foreach (ps[x]) begin
      @(negedge clk);
      pdw_valid = 0;
      while (pdw_fifo_full) @(negedge clk);
      pdw_valid = 1;
      pdw = ps[x].pdw;
    end
    @(negedge clk);
    pdw_valid = 0;
    wait (search_ends);
    @(negedge clk);
    @(negedge clk);
    check(int'(pdw_dropped) == drops0, "no PDW lost");
    ref_reset();
    foreach (ps[x]) ref_push(ps[x].pdw, cfg);
    ref_interpret(cfg, expq);
    check(got.size() == expq.size(), $sformatf("N=%0d j=%0d m=%0d: %0d beats, model %0d",
                                              n, j, miss, got.size(), expq.size()));
    foreach (expq[x])
      if (x < got.size()) check(got[x] == expq[x], $sformatf("N=%0d j=%0d m=%0d: beat %0d differs", n, j, miss, x));
    n_found = 0;
    foreach (es[r]) begin
      bit f = found(es[r]);
      n_found += int'(f);
      if (tally) begin
        gen_mode[int'(es[r].mode)]++;
        hit_mode[int'(es[r].mode)] += int'(f);
      end
    end
    n_extra = int'(radar_count) - n_found;
  endtask

  // several trials of one environment; returns the success rate in %
  task automatic env(string tag, int n, int j, int miss, int trials, output real rate);
    int tot = 0, ok = 0, extra = 0;
    for (int t = 0; t < trials; t++) begin
      int f, x;
      trial(n, j, miss, f, x);
      tot += n;
      ok += f;
      extra += x;
    end
    rate = 100.0 * ok / tot;
    $display("%-9s radars %2d  jitter %2d%%  missing %2d%%  success %6.2f%%  extra reports %0d",
             tag, n, j, miss, rate, extra);
  endtask

  initial begin
    real rate;
    int ns[4] = '{1, 3, 5, 8};
    int js[3] = '{0, 2, 5};
    int ms[3] = '{2, 5, 10};
    pdw = '0;
    cfg = '{d_freq: 16'd4, d_pw: 16'd4, d_pa: 16'd4, d_pri: 24'd8, occ_thr: 16'd3,
            stagger_occ: 8'd192, gap_occ: 8'd13, limit_mode: LIMIT_PULSES, search_limit: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;

    foreach (gen_mode[x]) begin gen_mode[x] = 0; hit_mode[x] = 0; end
    tally = 1;
    foreach (ns[a]) foreach (js[b]) foreach (ms[c]) env("table", ns[a], js[b], ms[c], (32 + ns[a] - 1) / ns[a], rate);
    tally = 0;
    $display("table environments by mode: stable %0d/%0d  dwell %0d/%0d  stagger %0d/%0d found",
             hit_mode[0], gen_mode[0], hit_mode[1], gen_mode[1], hit_mode[2], gen_mode[2]);
    for (int j = 0; j <= 16; j += 4) begin
      env("jitter", 1, j, 0, 32, rate);
      check(rate == 100.0, $sformatf("jitter %0d %%: emitter always found without missing pulses", j));
    end
    for (int m = 0; m <= 12; m += 3) env("missing", 1, 0, m, 32, rate);
    env("count", 59, 0, 0, 2, rate);
    check(rate == 100.0, "59 clean emitters all found");
    env("count", 20, 2, 5, 2, rate);
    env("count", 20, 5, 2, 2, rate);
    env("count", 20, 5, 10, 2, rate);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
