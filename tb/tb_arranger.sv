// tb_arranger: self-checking test of the Arranger with both cluster memories.
// Window 1: interleaved stable, level-3 stagger and dwell emitters with
// parameter noise, ended by the pulse-count limit; the PDW and PRI cluster
// tables in the memories are compared word by word with the reference model.
// Window 2: same kind of stream ended by the time limit (checked for timing).
// Window 3: more distinct PDWs than PDW clusters exist (full-memory refusal).
module tb_arranger;
  import rcda_pkg::*;
  import rcda_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  rcda_cfg_t cfg;
  logic in_valid = 0, in_pop, arranged, halted, interp_done = 0, busy;
  pdw_t in_pdw;
  pdw_idx_t pdw_count;
  pri_idx_t pri_count;
  logic pdw_we, pri_we;
  pdw_idx_t pdw_waddr, pdw_raddr;
  pri_idx_t pri_waddr, pri_raddr;
  pdw_cluster_t pdw_wdata, pdw_rdata;
  pri_cluster_t pri_wdata, pri_rdata;
  logic ev_pdw_new, ev_pdw_match, ev_pdw_full, ev_pri_new, ev_pri_match, ev_pri_full,
        ev_link, ev_limit_pulses, ev_limit_time;
  int n_pdw_new, n_pdw_match, n_pdw_full, n_pri_new, n_pri_match, n_link, n_lim_p, n_lim_t;

  always #5 clk = ~clk;

  arranger dut (.clk, .rst_n, .cfg, .in_valid, .in_pdw, .in_pop, .arranged, .halted,
                .interp_done, .pdw_count, .pri_count, .busy,
                .pdw_we, .pdw_waddr, .pdw_wdata, .pdw_raddr, .pdw_rdata,
                .pri_we, .pri_waddr, .pri_wdata, .pri_raddr, .pri_rdata,
                .ev_pdw_new, .ev_pdw_match, .ev_pdw_full, .ev_pri_new, .ev_pri_match,
                .ev_pri_full, .ev_link, .ev_limit_pulses, .ev_limit_time);
  pdw_cluster_ram u_pdw_ram (.clk, .we(pdw_we), .waddr(pdw_waddr), .wdata(pdw_wdata),
                             .raddr(pdw_raddr), .rdata(pdw_rdata));
  pri_cluster_ram u_pri_ram (.clk, .we(pri_we), .waddr(pri_waddr), .wdata(pri_wdata),
                             .raddr(pri_raddr), .rdata(pri_rdata));

  always @(posedge clk) if (rst_n) begin
    n_pdw_new   += int'(ev_pdw_new);
    n_pdw_match += int'(ev_pdw_match);
    n_pdw_full  += int'(ev_pdw_full);
    n_pri_new   += int'(ev_pri_new);
    n_pri_match += int'(ev_pri_match);
    n_link      += int'(ev_link);
    n_lim_p     += int'(ev_limit_pulses);
    n_lim_t     += int'(ev_limit_time);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // hand one PDW to the Arranger (acts as the FIFO output side)
  task automatic feed(pdw_t p);
    @(negedge clk);
    in_valid = 1;
    in_pdw   = p;
    do @(posedge clk); while (!in_pop);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic compare_tables();
    check(int'(pdw_count) == r_npdw, $sformatf("pdw_count %0d exp %0d", pdw_count, r_npdw));
    check(int'(pri_count) == r_npri, $sformatf("pri_count %0d exp %0d", pri_count, r_npri));
    for (int c = 1; c <= r_npdw; c++)
      check(u_pdw_ram.mem[c] == r_pdw[c], $sformatf("PDW cluster %0d", c));
    for (int c = 1; c <= r_npri; c++)
      check(u_pri_ram.mem[c] == r_pri[c],
            $sformatf("PRI cluster %0d: pri %0d occ %0d nxt %0d prv %0d / exp pri %0d occ %0d nxt %0d prv %0d",
                      c, u_pri_ram.mem[c].pri, u_pri_ram.mem[c].occ, u_pri_ram.mem[c].next,
                      u_pri_ram.mem[c].prev, r_pri[c].pri, r_pri[c].occ, r_pri[c].next, r_pri[c].prev));
  endtask

  task automatic release_window();
    @(negedge clk) interp_done = 1;
    @(negedge clk) interp_done = 0;
    @(negedge clk);
    check(pdw_count == '0 && pri_count == '0 && !halted, "clusters cleared after interpretation");
    ref_reset();
  endtask

  initial begin
    pulse_t ps[$];
    emitter_t ea, eb, ec;
    int t0;
    n_pdw_new = 0; n_pdw_match = 0; n_pdw_full = 0; n_pri_new = 0; n_pri_match = 0;
    n_link = 0; n_lim_p = 0; n_lim_t = 0;
    in_pdw = '0;
    cfg = '{d_freq: 16'd10, d_pw: 16'd4, d_pa: 16'd4, d_pri: 24'd3, occ_thr: 16'd3,
            stagger_occ: 8'd192, gap_occ: 8'd10, limit_mode: LIMIT_PULSES, search_limit: 0};
    ea = '{mode: MODE_STABLE,  pris: '{1000}, dwell_len: 0, freq: 1000, pw: 50, pa: 200, offset: 17};
    eb = '{mode: MODE_STAGGER, pris: '{700, 900, 1100}, dwell_len: 0, freq: 3000, pw: 20, pa: 100, offset: 230};
    ec = '{mode: MODE_DWELL,   pris: '{400, 3000}, dwell_len: 6, freq: 5000, pw: 80, pa: 150, offset: 55};
    gen_emitter(ea, 60000, 2, 0, ps);
    gen_emitter(eb, 60000, 2, 0, ps);
    gen_emitter(ec, 60000, 2, 0, ps);
    sort_pulses(ps);
    cfg.search_limit = ps.size();
    ref_reset();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- window 1: pulse-count limit
    foreach (ps[x]) begin
      feed(ps[x].pdw);
      ref_push(ps[x].pdw, cfg);
      if (x < ps.size() - 1) begin
        wait (!busy);
        check(!halted, "no early halt");
      end
    end
    wait (halted);
    repeat (2) @(posedge clk);
    check(n_lim_p == 1, "pulse-count limit fired once");
    compare_tables();
    check(n_pdw_new == 3 && n_pdw_match == ps.size() - 3, "PDW new/match counts");
    check(n_pri_new == r_npri && n_link > 0 && n_pri_match > 0, "PRI new/match/link events");
    release_window();

    // ---------------- window 2: time limit
    cfg.limit_mode   = LIMIT_TIME;
    cfg.search_limit = 3000;
    ps.delete();
    gen_emitter(ea, 8000, 0, 0, ps);
    sort_pulses(ps);
    t0 = 0;
    fork
      begin
        foreach (ps[x]) begin
          feed(ps[x].pdw);
          ref_push(ps[x].pdw, cfg);
          repeat (200) @(posedge clk);
          if (halted) break;
        end
      end
      begin
        @(posedge clk iff in_pop);
        while (!arranged) begin
          @(posedge clk);
          t0++;
        end
      end
    join
    repeat (2) @(posedge clk);
    check(n_lim_t == 1, "time limit fired once");
    check(t0 >= 3000 && t0 <= 3000 + 40, $sformatf("time limit after %0d clocks", t0));
    compare_tables();
    release_window();

    // ---------------- window 3: PDW cluster memory full
    cfg.limit_mode   = LIMIT_PULSES;
    cfg.search_limit = 70;
    for (int x = 0; x < 70; x++) begin
      pdw_t p;
      p = '{freq: 16'(100 + 50 * x), pw: 16'd10, pa: 16'd10, toa: 32'(1000 * x)};
      feed(p);
      ref_push(p, cfg);
    end
    wait (halted);
    repeat (2) @(posedge clk);
    check(n_pdw_full == 70 - 63, $sformatf("PDW memory full refusals %0d", n_pdw_full));
    compare_tables();

    $display("events: pdw_new=%0d pdw_match=%0d pdw_full=%0d pri_new=%0d pri_match=%0d link=%0d",
             n_pdw_new, n_pdw_match, n_pdw_full, n_pri_new, n_pri_match, n_link);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
