// tb_analyzer: end-to-end test of the Analyzer at its default parameters.
// Pulse trains of known emitters are generated, interleaved by TOA and
// presented in real time (one TOA tick = one clock). Each scenario is one
// collection window, so the restart after every interpretation is exercised:
//   A. the timing case of the algorithm's hardware evaluation: one stable and
//      one level-4 stagger emitter. Per-pulse update time must stay within 30
//      clocks and the first sequence_found must come within 15 clocks of
//      arranged.
//   B. stable, level-3 stagger and dwell emitters with parameter noise and
//      randomly missing pulses (waste data).
//   D. the time limit instead of the pulse-count limit.
//   E. more distinct PDWs than PDW clusters exist.
//   F. the same two emitters offered at 8 million PDWs per second (one every
//      12.5 clocks on average): no PDW may be lost.
//   C. (last) a burst of PDWs one clock apart: the input buffer overflows.
// Whenever no PDW was lost, the output beats must equal the reference model's;
// in A, B and D every generated emitter must also be found with the right
// mode, PRIs and frequency. Every mechanism is counted and must occur.
module tb_analyzer;
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

  // ------------------------------------------------------------ monitors
  radar_beat_t got[$];
  int ev_cnt [14];
  int n_queued, n_restart, max_busy, busy_run, first_seq_lat, lat_cnt;
  bit lat_armed;

  always @(posedge clk) if (rst_n) begin
    if (radar_valid) got.push_back(radar);
    for (int b = 0; b < 14; b++) ev_cnt[b] += int'(events[b]);
    // a PDW arrives while the Arranger is still busy: it waits in the buffer
    if (pdw_valid && (arranger_busy || dut.u_fifo.out_valid)) n_queued++;
    if (search_ends) n_restart++;
    if (arranger_busy) busy_run++;
    else begin
      if (busy_run > max_busy) max_busy = busy_run;
      busy_run = 0;
    end
    if (arranged) begin lat_armed = 1; lat_cnt = 0; end
    else if (lat_armed) begin
      lat_cnt++;
      if (sequence_found) begin
        lat_armed = 0;
        if (first_seq_lat < 0) first_seq_lat = lat_cnt;
      end
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
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

  // present pulses in real time; returns after the window is interpreted
  // spacing_override > 0: fixed spacing in clocks; spacing_x10 > 0: PDW x is
  // offered at clock floor(x * spacing_x10 / 10)
  task automatic play(ref pulse_t ps[$], input int spacing_override, input int spacing_x10 = 0);
    longint now = 0, base;
    int drops0 = int'(pdw_dropped);
    got.delete();
    base = ps[0].toa;
    foreach (ps[x]) begin
      longint due = (spacing_x10 > 0) ? longint'(x) * spacing_x10 / 10 :
                    (spacing_override > 0) ? now + spacing_override : ps[x].toa - base;
      while (now < due) begin
        @(negedge clk);
        pdw_valid = 0;
        now++;
      end
      @(negedge clk);
      pdw_valid = 1;
      pdw = ps[x].pdw;
      now++;
    end
    @(negedge clk);
    pdw_valid = 0;
    wait (search_ends);
    @(negedge clk);
    @(negedge clk);
    $display("  window: %0d pulses, %0d dropped, %0d beats, %0d emitters",
             ps.size(), int'(pdw_dropped) - drops0, got.size(), radar_count);
  endtask

  // beats must equal the model fed with the same PDWs
  task automatic compare_model(ref pulse_t ps[$], input string tag);
    radar_beat_t expq[$];
    ref_reset();
    foreach (ps[x]) ref_push(ps[x].pdw, cfg);
    ref_interpret(cfg, expq);
    check(got.size() == expq.size(), $sformatf("%s: %0d beats, model %0d", tag, got.size(), expq.size()));
    foreach (expq[x])
      if (x < got.size()) check(got[x] == expq[x], $sformatf("%s: beat %0d differs from model", tag, x));
  endtask

  // the emitter must appear among the reported ones with its mode and PRIs
  task automatic find_emitter(emitter_t e, input string tag);
    int want[$];
    bit found = 0;
    if (e.mode == MODE_DWELL) want = '{e.pris[0], e.pris[1]};
    else want = e.pris;
    foreach (got[x]) begin
      if (got[x].pos == 0 && got[x].mode == e.mode && int'(got[x].level) == want.size() &&
          near(got[x].freq, e.freq, cfg.d_freq) && x + want.size() <= got.size()) begin
        // PRIs as a cyclic sequence (the chain may start anywhere)
        for (int r = 0; r < want.size() && !found; r++) begin
          bit ok = 1;
          for (int k = 0; k < want.size(); k++)
            if (!near(got[x + k].pri, want[(r + k) % want.size()], cfg.d_pri)) ok = 0;
          if (ok) found = 1;
        end
      end
    end
    check(found, $sformatf("%s: emitter mode %0d freq %0d PRI %0d not found", tag, e.mode, e.freq, want[0]));
  endtask

  initial begin
    pulse_t ps[$];
    emitter_t ea, eb, ec, es4;
    foreach (ev_cnt[b]) ev_cnt[b] = 0;
    n_queued = 0; n_restart = 0; max_busy = 0; busy_run = 0; first_seq_lat = -1;
    lat_armed = 0; lat_cnt = 0;
    pdw = '0;
    cfg = '{d_freq: 16'd20, d_pw: 16'd8, d_pa: 16'd8, d_pri: 24'd6, occ_thr: 16'd4,
            stagger_occ: 8'd192, gap_occ: 8'd13, limit_mode: LIMIT_PULSES, search_limit: 0};
    ea  = '{mode: MODE_STABLE,  pris: '{1000}, dwell_len: 0, freq: 1000, pw: 50, pa: 200, offset: 17};
    es4 = '{mode: MODE_STAGGER, pris: '{300, 450, 600, 750}, dwell_len: 0, freq: 3000, pw: 20, pa: 100, offset: 230};
    eb  = '{mode: MODE_STAGGER, pris: '{700, 900, 1100}, dwell_len: 0, freq: 6000, pw: 30, pa: 120, offset: 230};
    ec  = '{mode: MODE_DWELL,   pris: '{400, 3000}, dwell_len: 9, freq: 9000, pw: 80, pa: 150, offset: 55};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- A: stable + level-4 stagger, timing
    $display("scenario A");
    gen_emitter(ea, 40000, 0, 0, ps);
    gen_emitter(es4, 40000, 0, 0, ps);
    sort_pulses(ps);
    cfg.search_limit = ps.size();
    max_busy = 0;
    play(ps, 0);
    $display("  longest cluster update %0d clocks, arranged to first sequence_found %0d clocks",
             max_busy + 1, first_seq_lat);
    check(max_busy + 1 <= 30, $sformatf("cluster update %0d clocks (<= 30)", max_busy + 1));
    check(first_seq_lat > 0 && first_seq_lat <= 15, $sformatf("interpretation %0d clocks (<= 15)", first_seq_lat));
    compare_model(ps, "A");
    find_emitter(ea, "A");
    find_emitter(es4, "A");
    check(radar_count == 2, "A: two emitters");

    // ---------------- B: three emitters, noise and missing pulses
    $display("scenario B");
    ps.delete();
    gen_emitter(ea, 60000, 3, 5, ps);
    gen_emitter(eb, 60000, 3, 5, ps);
    gen_emitter(ec, 60000, 3, 5, ps);
    sort_pulses(ps);
    cfg.search_limit = ps.size();
    play(ps, 0);
    if (pdw_dropped == 0) compare_model(ps, "B");
    find_emitter(ea, "B");
    find_emitter(eb, "B");
    find_emitter(ec, "B");

    // ---------------- D: time limit
    $display("scenario D");
    ps.delete();
    gen_emitter(ea, 30000, 0, 0, ps);
    gen_emitter(ec, 30000, 0, 0, ps);
    sort_pulses(ps);
    cfg.limit_mode   = LIMIT_TIME;
    cfg.search_limit = 28000;
    begin
      pulse_t part[$];
      foreach (ps[x]) if (ps[x].toa - ps[0].toa < 28000) part.push_back(ps[x]);
      play(part, 0);
      compare_model(part, "D");
    end
    find_emitter(ea, "D");
    find_emitter(ec, "D");
    cfg.limit_mode   = LIMIT_PULSES;

    // ---------------- E: PDW cluster memory full
    $display("scenario E");
    ps.delete();
    for (int x = 0; x < 70; x++) begin
      pulse_t p;
      p.toa = 100 * x;
      p.pdw = '{freq: 16'(100 + 50 * x), pw: 16'd10, pa: 16'd10, toa: 32'(100 * x)};
      ps.push_back(p);
    end
    cfg.search_limit = 70;
    play(ps, 0);

    // ---------------- F: scenario A's emitters at 8 million PDWs per second
    // (one PDW every 12.5 clocks of 10 ns on average): nothing may be lost
    $display("scenario F");
    ps.delete();
    gen_emitter(ea, 40000, 0, 0, ps);
    gen_emitter(es4, 40000, 0, 0, ps);
    sort_pulses(ps);
    cfg.search_limit = ps.size();
    begin
      int drops0;
      drops0 = int'(pdw_dropped);
      play(ps, 0, 125);
      check(int'(pdw_dropped) == drops0, "F: 8 Mpulse/s sustained without loss");
      compare_model(ps, "F");
    end

    // ---------------- C: burst faster than the Arranger
    $display("scenario C");
    ps.delete();
    gen_emitter(ea, 20000, 0, 0, ps);
    cfg.search_limit = 3;
    play(ps, 1);
    check(pdw_dropped > 0, "C: buffer overflow drops PDWs");

    // ---------------- mechanisms
    $display("events: pdw_new %0d pdw_match %0d pdw_full %0d pri_new %0d pri_match %0d pri_full %0d link %0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5], ev_cnt[6]);
    $display("        limit_pulses %0d limit_time %0d waste %0d stable %0d dwell %0d stagger %0d broken %0d",
             ev_cnt[7], ev_cnt[8], ev_cnt[9], ev_cnt[10], ev_cnt[11], ev_cnt[12], ev_cnt[13]);
    $display("        queued %0d dropped %0d restarts %0d", n_queued, pdw_dropped, n_restart);
    check(ev_cnt[0] > 0, "mechanism: new PDW cluster");
    check(ev_cnt[1] > 0, "mechanism: PDW cluster match");
    check(ev_cnt[2] > 0, "mechanism: PDW cluster memory full");
    check(ev_cnt[3] > 0, "mechanism: new PRI cluster");
    check(ev_cnt[4] > 0, "mechanism: PRI cluster match");
    check(ev_cnt[6] > 0, "mechanism: PRI chain link");
    check(ev_cnt[7] > 0, "mechanism: pulse-count limit");
    check(ev_cnt[8] > 0, "mechanism: time limit");
    check(ev_cnt[9] > 0, "mechanism: waste data");
    check(ev_cnt[10] > 0, "mechanism: stable emitter");
    check(ev_cnt[11] > 0, "mechanism: dwell emitter");
    check(ev_cnt[12] > 0, "mechanism: stagger emitter");
    check(n_queued > 0, "mechanism: PDW queued while busy");
    check(pdw_dropped > 0, "mechanism: PDW lost at full buffer");
    check(n_restart >= 6, "mechanism: restart after interpretation");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
