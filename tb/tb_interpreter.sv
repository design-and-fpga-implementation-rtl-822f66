// tb_interpreter: self-checking test of the Interpreter.
// The cluster memories are loaded through their write ports, then the
// Interpreter is started and its output beats are compared with:
//   1. a hand-built table holding a stable, a level-3 stagger, a dwell, a
//      waste-data, a broken-chain and a low-ratio case, against results
//      worked out by hand (modes, PRIs, order, emitter count);
//   2. the published timing case (one stable and one level-4 stagger emitter):
//      sequence_found within 15 clocks of the start;
//   3. random tables with random links and occurrences, against the
//      reference model's classification.
module tb_interpreter;
  import rcda_pkg::*;
  import rcda_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, busy;
  rcda_cfg_t cfg;
  pri_idx_t pri_count, pri_raddr, pri_waddr;
  pdw_idx_t pdw_raddr, pdw_waddr;
  pri_cluster_t pri_rdata, pri_wdata;
  pdw_cluster_t pdw_rdata, pdw_wdata;
  logic pri_we = 0, pdw_we = 0;
  logic beat_valid, sequence_found, search_ends;
  radar_beat_t beat;
  pri_idx_t radar_count;
  logic ev_waste, ev_stable, ev_dwell, ev_stagger, ev_broken;
  radar_beat_t got[$];
  int n_waste, n_stable, n_dwell, n_stagger, n_broken;

  always #5 clk = ~clk;

  interpreter dut (.clk, .rst_n, .cfg, .start, .pri_count, .busy,
                   .pri_raddr, .pri_rdata, .pdw_raddr, .pdw_rdata,
                   .beat_valid, .beat, .sequence_found, .search_ends, .radar_count,
                   .ev_waste, .ev_stable, .ev_dwell, .ev_stagger, .ev_broken);
  pdw_cluster_ram u_pdw_ram (.clk, .we(pdw_we), .waddr(pdw_waddr), .wdata(pdw_wdata),
                             .raddr(pdw_raddr), .rdata(pdw_rdata));
  pri_cluster_ram u_pri_ram (.clk, .we(pri_we), .waddr(pri_waddr), .wdata(pri_wdata),
                             .raddr(pri_raddr), .rdata(pri_rdata));

  always @(posedge clk) if (rst_n) begin
    if (beat_valid) got.push_back(beat);
    n_waste   += int'(ev_waste);
    n_stable  += int'(ev_stable);
    n_dwell   += int'(ev_dwell);
    n_stagger += int'(ev_stagger);
    n_broken  += int'(ev_broken);
  end

  initial begin
    repeat (300000) @(posedge clk);
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

  // write the model tables into the memories
  task automatic load();
    for (int c = 1; c <= r_npdw; c++) begin
      @(negedge clk); pdw_we = 1; pdw_waddr = PDW_IDX_W'(c); pdw_wdata = r_pdw[c];
    end
    for (int c = 1; c <= r_npri; c++) begin
      @(negedge clk); pdw_we = 0; pri_we = 1; pri_waddr = PRI_IDX_W'(c); pri_wdata = r_pri[c];
    end
    @(negedge clk); pdw_we = 0; pri_we = 0;
    pri_count = PRI_IDX_W'(r_npri);
  endtask

  // run the Interpreter; returns clocks to the first sequence_found
  task automatic run(output int first_lat);
    int cyc = 0;
    first_lat = -1;
    got.delete();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!search_ends) begin
      @(posedge clk);
      cyc++;
      if (sequence_found && first_lat < 0) first_lat = cyc;
    end
    @(negedge clk);
  endtask

  task automatic compare_ref(string tag);
    radar_beat_t expq[$];
    ref_interpret(cfg, expq);
    check(got.size() == expq.size(), $sformatf("%s: %0d beats, expected %0d", tag, got.size(), expq.size()));
    foreach (expq[x])
      if (x < got.size())
        check(got[x] == expq[x], $sformatf("%s: beat %0d differs (pri %0d mode %0d / exp pri %0d mode %0d)",
                                           tag, x, got[x].pri, got[x].mode, expq[x].pri, expq[x].mode));
  endtask

  function automatic void set_pri(int c, int pri, int pdw, int occ, int nxt);
    r_pri[c] = '{pri: PRI_W'(pri), pdw_ptr: PDW_IDX_W'(pdw), occ: OCC_W'(occ),
                 next: PRI_IDX_W'(nxt), prev: '0};
  endfunction

  initial begin
    int lat;
    int exp_pri[$];
    pri_mode_e exp_mode[$];
    n_waste = 0; n_stable = 0; n_dwell = 0; n_stagger = 0; n_broken = 0;
    pri_count = '0;
    pri_waddr = '0; pdw_waddr = '0; pri_wdata = '0; pdw_wdata = '0;
    cfg = '{d_freq: 16'd10, d_pw: 16'd4, d_pa: 16'd4, d_pri: 24'd3, occ_thr: 16'd3,
            stagger_occ: 8'd192, gap_occ: 8'd10, limit_mode: LIMIT_PULSES, search_limit: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- 1. hand-built table
    ref_reset();
    r_npdw = 5;
    for (int c = 1; c <= 5; c++)
      r_pdw[c] = '{freq: FREQ_W'(1000 * c), pw: PW_W'(10 * c), pa: PA_W'(100 + c),
                   toa: '0, n: '0, last_pri: '0};
    r_npri = 11;
    set_pri(1, 1000, 1, 50, 0);                 // stable
    set_pri(2, 700, 2, 20, 3);                  // stagger level 3
    set_pri(3, 900, 2, 20, 4);
    set_pri(4, 1100, 2, 19, 2);
    set_pri(5, 400, 3, 60, 6);                  // dwell: main PRI
    set_pri(6, 3000, 3, 9, 5);                  //        gap
    set_pri(7, 2000, 1, 1, 0);                  // waste data
    set_pri(8, 500, 4, 10, 9);                  // stagger-like, chain ends in 0: broken
    set_pri(9, 600, 4, 10, 0);                  //   then reported alone as stable
    set_pri(10, 800, 5, 100, 11);               // ratio 3/100 below gap_occ: stable
    set_pri(11, 1600, 5, 3, 10);                //   and 11 alone (next already reported)
    load();
    run(lat);
    exp_pri  = '{1000, 700, 900, 1100, 400, 3000, 600, 800, 1600};
    exp_mode = '{MODE_STABLE, MODE_STAGGER, MODE_STAGGER, MODE_STAGGER, MODE_DWELL, MODE_DWELL,
                 MODE_STABLE, MODE_STABLE, MODE_STABLE};
    check(got.size() == exp_pri.size(), $sformatf("hand table: %0d beats", got.size()));
    foreach (exp_pri[x])
      if (x < got.size())
        check(int'(got[x].pri) == exp_pri[x] && got[x].mode == exp_mode[x],
              $sformatf("hand table beat %0d: pri %0d mode %0d", x, got[x].pri, got[x].mode));
    check(got.size() > 1 && got[1].freq == 16'd2000 && got[1].level == 4'd3 && got[3].last,
          "stagger beats carry PDW values and level");
    check(radar_count == 6, $sformatf("radar_count %0d", radar_count));
    check(n_waste == 1 && n_broken == 1 && n_stable == 4 && n_dwell == 1 && n_stagger == 1,
          $sformatf("event counts w%0d b%0d s%0d d%0d g%0d", n_waste, n_broken, n_stable, n_dwell, n_stagger));
    compare_ref("hand table");

    // ---------------- 2. timing case: stable + level-4 stagger
    ref_reset();
    r_npdw = 2;
    r_pdw[1] = '{freq: 16'd1000, pw: 16'd50, pa: 16'd200, toa: '0, n: '0, last_pri: '0};
    r_pdw[2] = '{freq: 16'd3000, pw: 16'd20, pa: 16'd100, toa: '0, n: '0, last_pri: '0};
    r_npri = 5;
    set_pri(1, 1000, 1, 40, 0);
    set_pri(2, 300, 2, 25, 3);
    set_pri(3, 400, 2, 25, 4);
    set_pri(4, 500, 2, 24, 5);
    set_pri(5, 600, 2, 24, 2);
    load();
    run(lat);
    $display("timing case: first sequence_found after %0d clocks", lat);
    check(lat > 0 && lat <= 15, $sformatf("first sequence_found after %0d clocks (<= 15)", lat));
    check(radar_count == 2, "two emitters in timing case");
    compare_ref("timing case");

    // ---------------- 3. random tables
    for (int t = 0; t < 60; t++) begin
      ref_reset();
      r_npdw = $urandom_range(1, 20);
      for (int c = 1; c <= r_npdw; c++)
        r_pdw[c] = '{freq: FREQ_W'($urandom), pw: PW_W'($urandom), pa: PA_W'($urandom),
                     toa: '0, n: '0, last_pri: '0};
      r_npri = $urandom_range(1, (t < 50) ? 40 : 255);
      for (int c = 1; c <= r_npri; c++) begin
        int sel, nx;
        sel = $urandom_range(0, 3);
        nx = (sel == 0) ? 0 : (sel == 1) ? ((c % r_npri) + 1) :
                 (sel == 2) ? ((c > 1) ? c - 1 : r_npri) : $urandom_range(1, r_npri);
        set_pri(c, $urandom_range(1, 5000), $urandom_range(1, r_npdw),
                $urandom_range(0, 1) ? $urandom_range(0, 5) : $urandom_range(16, 20), nx);
      end
      load();
      run(lat);
      compare_ref($sformatf("random table %0d", t));
    end
    check(n_broken > 1 && n_stagger > 1 && n_dwell > 1,
          $sformatf("random tables reached all outcomes b%0d g%0d d%0d", n_broken, n_stagger, n_dwell));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
