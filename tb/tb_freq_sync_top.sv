// tb_freq_sync_top: end-to-end test of the whole design at its default sizes
// (four UWB lanes of 4-bit samples, 8-bit 802.11a samples, 16-bit phases).
// Both synchronizers run at once on their own clocks (UWB about 6.25 times
// faster than WLAN, close to 132 MHz against 20 MHz).
//
// UWB side: a packet sequence that walks the power-aware rule through all of
// its cases. For every packet the testbench works out independently whether
// the fine pass must run (from the coarse estimate the block reports, the
// last estimate in use, the threshold and pa_enable) and compares with
// fine_ran. It checks the estimate against the true offset, the compensated
// output against the clean transmitted samples (rotation left between two
// windows 1000 samples apart equals the offset minus the estimate in use,
// within 0.1 rad), one output word per input word with the two-register delay
// (so full rate, 4 samples per clock, when the input has no gaps), and the
// est_valid time for packets without input gaps.
//
// WLAN side: preambles with both short-symbol power profiles and offsets up
// to +-0.4 turn per short symbol; checks the parity choice, coarse and fine
// estimates, residual rotation of the compensated data and one output per
// input.
//
// Mechanisms counted, each must occur at least once: UWB fine pass run, fine
// pass skipped, fine pass forced by the tight (2 ppm) threshold where the
// loose one would skip, fine forced by pa_enable = 0, every start lane, input
// gaps; WLAN even and odd parity, input gaps.
//
// Mechanisms, thresholds and rates follow the synchronizer description;
// tolerances, offsets and packet sequences are this testbench's own. No
// parameter of the top is overridden.
module tb_freq_sync_top;
  import uwb_sig_pkg::*;
  import wlan_sig_pkg::*;
  localparam int LANES = fsync_pkg::UWB_LANES, UDW = fsync_pkg::UWB_DATA_W, UOW = UDW + 2;
  localparam int WDW = fsync_pkg::WLAN_DATA_W, WOW = WDW + 2, PW = fsync_pkg::PHASE_W;
  localparam int SYM_LEN = fsync_pkg::UWB_SYM_LEN;
  localparam int THR_SV = fsync_pkg::UWB_THR_SV, THR_FV = fsync_pkg::UWB_THR_FV;

  logic uwb_clk = 0, uwb_rst_n = 0, uwb_in_valid = 0, uwb_pkt_start = 0, uwb_pa_enable = 1;
  logic signed [UDW-1:0] uwb_in_re [LANES];
  logic signed [UDW-1:0] uwb_in_im [LANES];
  logic [$clog2(LANES)-1:0] uwb_start_lane = 0;
  logic [PW-1:0] uwb_thr = PW'(THR_SV);
  logic uwb_out_valid, uwb_est_valid, uwb_fine_ran;
  logic signed [UOW-1:0] uwb_out_re [LANES];
  logic signed [UOW-1:0] uwb_out_im [LANES];
  logic signed [PW-1:0] uwb_est_phase, uwb_coarse_phase;

  logic wlan_clk = 0, wlan_rst_n = 0, wlan_in_valid = 0, wlan_pkt_start = 0;
  logic signed [WDW-1:0] wlan_in_re = 0, wlan_in_im = 0;
  logic wlan_out_valid, wlan_coarse_valid, wlan_est_valid, wlan_odd_coarse;
  logic signed [WOW-1:0] wlan_out_re, wlan_out_im;
  logic signed [PW-1:0] wlan_coarse_phase, wlan_fine_phase;

  int checks = 0, failures = 0;
  int m_fine = 0, m_skip = 0, m_fv = 0, m_pa_off = 0, m_ugap = 0;
  int m_lane [LANES];
  int m_odd = 0, m_even = 0, m_wgap = 0;
  bit uwb_have = 0;
  int uwb_prev = 0;

  freq_sync_top dut (.*);

  always #4 uwb_clk = ~uwb_clk;
  always #25 wlan_clk = ~wlan_clk;
  initial begin
    repeat (200000) @(posedge wlan_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrapr(real d);
    return d - $floor(d + 0.5);
  endfunction
  function automatic int wrapi(int d);   // to -2^15 .. 2^15-1
    int m;
    m = d & ((1 << PW) - 1);
    return m >= (1 << (PW - 1)) ? m - (1 << PW) : m;
  endfunction
  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- UWB ----
  task automatic uwb_packet_run(real cfo, int lane, bit pa, int thr, bit gaps);
    uwb_packet p = new(3300, cfo, 2.3, 0.2);
    int nw = (p.len + lane) / LANES, iw = 0, ow = 0, ev = -1, cyc = 0;
    bit prev_v = 0, exp_fine, seen_ev = 0;
    real a1_re = 0, a1_im = 0, a2_re = 0, a2_im = 0, d, e;
    int last_idx, ev_word = -1;
    uwb_pa_enable = pa;
    uwb_thr = PW'(thr);
    m_lane[lane]++;
    if (!pa) m_pa_off++;
    while (ow < nw) begin
      bit v;
      @(negedge uwb_clk);
      v = (iw < nw) && !(gaps && iw > 0 && $urandom_range(0, 4) == 0);
      if (v && gaps && iw > 0 && !prev_v) m_ugap++;
      uwb_in_valid = v;
      uwb_pkt_start = v && (iw == 0);
      uwb_start_lane = $clog2(LANES)'(lane);
      for (int l = 0; l < LANES; l++) begin
        int k;
        k = iw * LANES - lane + l;
        uwb_in_re[l] = (v && k >= 0) ? UDW'(p.rx_re[k]) : UDW'($urandom);
        uwb_in_im[l] = (v && k >= 0) ? UDW'(p.rx_im[k]) : UDW'($urandom);
      end
      @(posedge uwb_clk); #1;
      // output valid follows input valid one clock after it is captured
      if (cyc > 0) check(uwb_out_valid == prev_v, "UWB out_valid does not follow in_valid");
      if (uwb_est_valid && !seen_ev) begin
        seen_ev = 1;
        ev_word = iw;
        // what the power-aware rule must have chosen, from the coarse value
        exp_fine = !pa || !uwb_have || iabs(wrapi(int'(uwb_coarse_phase) - uwb_prev)) > thr;
        check(uwb_fine_ran == exp_fine, $sformatf("UWB fine_ran %0d, rule gives %0d (coarse %0d, prev %0d, thr %0d)",
              uwb_fine_ran, exp_fine, uwb_coarse_phase, uwb_prev, thr));
        if (uwb_fine_ran) begin
          m_fine++;
          if (pa && uwb_have && iabs(wrapi(int'(uwb_coarse_phase) - uwb_prev)) <= THR_SV) m_fv++;
          check(iabs(wrapi(int'(uwb_est_phase) - int'($rtoi(cfo * 65536.0)))) < 600,
                $sformatf("UWB fine estimate %0d for cfo %f", uwb_est_phase, cfo));
        end else m_skip++;
        uwb_have = 1;
        uwb_prev = int'(uwb_est_phase);
      end
      if (uwb_out_valid) begin
        for (int l = 0; l < LANES; l++) begin
          int k;
          k = ow * LANES - lane + l;
          if (k >= 1800 && k < 2300) begin
            a1_re += real'(uwb_out_re[l]) * p.tx_re[k] + real'(uwb_out_im[l]) * p.tx_im[k];
            a1_im += real'(uwb_out_im[l]) * p.tx_re[k] - real'(uwb_out_re[l]) * p.tx_im[k];
          end
          if (k >= 2800 && k < 3300) begin
            a2_re += real'(uwb_out_re[l]) * p.tx_re[k] + real'(uwb_out_im[l]) * p.tx_im[k];
            a2_im += real'(uwb_out_im[l]) * p.tx_re[k] - real'(uwb_out_re[l]) * p.tx_im[k];
          end
        end
        ow++;
      end
      prev_v = v;
      if (v) iw++;
      cyc++;
    end
    @(negedge uwb_clk);
    uwb_in_valid = 0;
    uwb_pkt_start = 0;
    check(seen_ev, "UWB est_valid never came");
    if (!gaps && seen_ev) begin
      last_idx = uwb_fine_ran ? (fsync_pkg::UWB_DIST * 2 + 1 + fsync_pkg::UWB_DIST) * SYM_LEN + 160
                              : (1 + fsync_pkg::UWB_DIST) * SYM_LEN + 64;
      check(ev_word == (last_idx + lane) / LANES + 18,
            $sformatf("UWB est_valid at word %0d, expected %0d", ev_word, (last_idx + lane) / LANES + 18));
    end
    e = 2.0 * PI * (cfo - real'(uwb_est_phase) / 65536.0) * 1000.0 / 495.0;
    d = wrapr(($atan2(a2_im, a2_re) - $atan2(a1_im, a1_re) - e) / (2.0 * PI)) * 2.0 * PI;
    check(d < 0.1 && d > -0.1, $sformatf("UWB residual rotation %f rad, cfo %f", d, cfo));
  endtask

  task automatic uwb_side();
    real c;
    uwb_packet_run(0.3975, 0, 1, THR_SV, 0);   // first packet: fine
    uwb_packet_run(0.3975, 1, 1, THR_SV, 0);   // same offset: skipped
    uwb_packet_run(0.35, 2, 1, THR_SV, 0);     // moved 0.05 turn: under the loose threshold
    uwb_packet_run(0.30, 3, 1, THR_FV, 0);     // moved 0.05 turn: over the tight threshold
    uwb_packet_run(0.30, 0, 0, THR_SV, 0);     // power-aware off: fine anyway
    uwb_packet_run(-0.2, 1, 1, THR_SV, 1);     // large move, input with gaps
    uwb_packet_run(-0.2, 3, 1, THR_SV, 1);     // skipped, with gaps
    for (int i = 0; i < 8; i++) begin
      c = real'($urandom_range(0, 900)) / 1000.0 - 0.45;
      uwb_packet_run(c, int'($urandom_range(0, LANES - 1)), 1, THR_SV, 0);
    end
  endtask

  // --------------------------------------------------------------- WLAN ----
  // cfo: offset in turns per short symbol (16 samples)
  task automatic wlan_packet_run(real cfo_sym, bit odd_strong, bit gaps);
    real cfo = cfo_sym / 16.0;
    wlan_packet p = new(500, cfo, odd_strong, 30.0, 1.0);
    int ik = 0, oi = 0, tail = 0;
    bit cv = 0, evs = 0, prev_v = 0;
    real a1_re = 0, a1_im = 0, a2_re = 0, a2_im = 0, d, fine_est;
    while (oi < p.len) begin
      bit v;
      @(negedge wlan_clk);
      v = (ik < p.len) && !(gaps && ik > 0 && $urandom_range(0, 3) == 0);
      if (v && gaps && ik > 0 && !prev_v) m_wgap++;
      wlan_in_valid = v;
      wlan_pkt_start = v && (ik == 0);
      wlan_in_re = v ? WDW'(p.rx_re[ik]) : WDW'($urandom);
      wlan_in_im = v ? WDW'(p.rx_im[ik]) : WDW'($urandom);
      @(posedge wlan_clk); #1;
      if (wlan_coarse_valid && !cv) begin
        cv = 1;
        check(wlan_odd_coarse == odd_strong, "WLAN parity choice");
        if (wlan_odd_coarse) m_odd++; else m_even++;
        check(iabs(wrapi(int'(wlan_coarse_phase) - $rtoi(16.0 * cfo * 65536.0))) < 400,
              $sformatf("WLAN coarse %0d for cfo %f", wlan_coarse_phase, cfo));
      end
      if (wlan_est_valid && !evs) begin
        evs = 1;
        fine_est = real'(wlan_coarse_phase) / 16.0 + real'(wlan_fine_phase) / 64.0;
        check(iabs($rtoi(16.0 * (fine_est - cfo * 65536.0))) < 100,
              $sformatf("WLAN coarse+fine %f for cfo %f", fine_est / 65536.0, cfo));
      end
      if (wlan_out_valid) begin
        if (oi >= 300 && oi < 380) begin
          a1_re += real'(wlan_out_re) * p.tx_re[oi] + real'(wlan_out_im) * p.tx_im[oi];
          a1_im += real'(wlan_out_im) * p.tx_re[oi] - real'(wlan_out_re) * p.tx_im[oi];
        end
        if (oi >= 600 && oi < 680) begin
          a2_re += real'(wlan_out_re) * p.tx_re[oi] + real'(wlan_out_im) * p.tx_im[oi];
          a2_im += real'(wlan_out_im) * p.tx_re[oi] - real'(wlan_out_re) * p.tx_im[oi];
        end
        oi++;
      end
      prev_v = v;
      if (v) ik++;
      if (ik >= p.len) tail++;
      if (tail > 40) break;
    end
    @(negedge wlan_clk);
    wlan_in_valid = 0;
    wlan_pkt_start = 0;
    check(cv && evs, "WLAN estimates never came");
    check(oi == p.len, $sformatf("WLAN %0d outputs for %0d inputs", oi, p.len));
    d = wrapr(($atan2(a2_im, a2_re) - $atan2(a1_im, a1_re)) / (2.0 * PI)) * 2.0 * PI;
    check(d < 0.15 && d > -0.15, $sformatf("WLAN residual rotation %f rad, cfo %f", d, cfo));
  endtask

  task automatic wlan_side();
    wlan_packet_run(0.3, 1, 0);
    wlan_packet_run(-0.35, 0, 0);
    wlan_packet_run(0.1, 0, 1);
    wlan_packet_run(-0.05, 1, 1);
    for (int i = 0; i < 6; i++)
      wlan_packet_run(real'($urandom_range(0, 800)) / 1000.0 - 0.4, 1'($urandom), 1'($urandom));
  endtask

  initial begin
    for (int l = 0; l < LANES; l++) begin
      uwb_in_re[l] = 0;
      uwb_in_im[l] = 0;
      m_lane[l] = 0;
    end
    repeat (3) @(posedge wlan_clk);
    uwb_rst_n = 1;
    wlan_rst_n = 1;
    fork
      uwb_side();
      wlan_side();
    join
    check(m_fine > 0, "mechanism never seen: UWB fine pass run");
    check(m_skip > 0, "mechanism never seen: UWB fine pass skipped");
    check(m_fv > 0, "mechanism never seen: fine pass forced by the tight threshold");
    check(m_pa_off > 0, "mechanism never seen: power-aware mode off");
    check(m_ugap > 0, "mechanism never seen: UWB input gaps");
    for (int l = 0; l < LANES; l++)
      check(m_lane[l] > 0, $sformatf("mechanism never seen: start lane %0d", l));
    check(m_odd > 0, "mechanism never seen: WLAN odd parity");
    check(m_even > 0, "mechanism never seen: WLAN even parity");
    check(m_wgap > 0, "mechanism never seen: WLAN input gaps");
    $display("UWB fine %0d skipped %0d tight-threshold %0d pa-off %0d gaps %0d; WLAN odd %0d even %0d gaps %0d",
             m_fine, m_skip, m_fv, m_pa_off, m_ugap, m_odd, m_even, m_wgap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
