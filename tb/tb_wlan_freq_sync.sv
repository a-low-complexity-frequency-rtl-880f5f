// tb_wlan_freq_sync: generated 802.11a preambles with known carrier offsets
// (up to +-0.4 turn per short symbol, i.e. +-500 kHz) and both short-symbol
// power profiles. Checks
//  - the parity picked by the power detection,
//  - the coarse estimate against 16*cfo (within 400/2^16 turn),
//  - coarse + fine (phi_c/16 + phi_f/64) against cfo per sample (within
//    100/2^16 turn per 16 samples, about 1.9 kHz or 0.4 ppm at 5.3 GHz),
//  - that the compensated data, compared with the clean transmitted data,
//    keep a constant phase (residual drift over 300 samples under 0.15 rad),
//  - when coarse_valid and est_valid appear: 17 clocks after the last coarse
//    sample, 19 after the last fine sample (two of them in the compensator).
//
// The preamble structure and the parity scheme follow the synchronizer
// description; tolerances and the timing counts are this design's own.
module tb_wlan_freq_sync;
  import wlan_sig_pkg::*;
  localparam int DATA_W = 8, OUT_W = 10, PHASE_W = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, pkt_start = 0;
  logic signed [DATA_W-1:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_re, out_im;
  logic signed [PHASE_W-1:0] coarse_phase, fine_phase;
  logic coarse_valid, est_valid, odd_coarse;
  int checks = 0, failures = 0;
  int n_odd = 0, n_even = 0;

  wlan_freq_sync dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrapr(real d);
    return d - $floor(d + 0.5);
  endfunction

  task automatic packet(real cfo, bit odd_strong);
    wlan_packet p = new(600, cfo, odd_strong, 30.0, 1.0);
    int cv_at = -1, ev_at = -1, oi = 0;
    real acc1_re = 0, acc1_im = 0, acc2_re = 0, acc2_im = 0, a1, a2, tot;
    for (int k = 0; k < p.len + 3; k++) begin
      @(negedge clk);
      in_valid = (k < p.len);
      pkt_start = (k == 0);
      in_re = (k < p.len) ? DATA_W'(p.rx_re[k]) : '0;
      in_im = (k < p.len) ? DATA_W'(p.rx_im[k]) : '0;
      @(posedge clk); #1;
      if (coarse_valid) cv_at = k;
      if (est_valid) ev_at = k;
      if (out_valid) begin
        // output sample oi corresponds to input oi; compare with clean tx
        if (oi >= 300 && oi < 450) begin
          acc1_re += real'(out_re) * p.tx_re[oi] + real'(out_im) * p.tx_im[oi];
          acc1_im += real'(out_im) * p.tx_re[oi] - real'(out_re) * p.tx_im[oi];
        end
        if (oi >= 600 && oi < 750) begin
          acc2_re += real'(out_re) * p.tx_re[oi] + real'(out_im) * p.tx_im[oi];
          acc2_im += real'(out_im) * p.tx_re[oi] - real'(out_re) * p.tx_im[oi];
        end
        oi++;
      end
    end
    @(negedge clk); in_valid = 0; pkt_start = 0;
    checks++;
    if (odd_coarse != odd_strong) begin
      failures++; $display("FAIL parity %0d expected %0d", odd_coarse, odd_strong);
    end
    if (odd_coarse) n_odd++; else n_even++;
    checks++;
    if (cv_at != 62 + int'(odd_strong) + 17 || ev_at != 222 + int'(!odd_strong) + 19) begin
      failures++; $display("FAIL timing: coarse at %0d, fine at %0d", cv_at, ev_at);
    end
    checks++;
    if (wrapr(real'(coarse_phase) / 65536.0 - 16.0 * cfo) > 400.0 / 65536.0 ||
        wrapr(real'(coarse_phase) / 65536.0 - 16.0 * cfo) < -400.0 / 65536.0) begin
      failures++; $display("FAIL coarse %0d vs %f", coarse_phase, 16.0 * cfo * 65536.0);
    end
    tot = real'(coarse_phase) / 65536.0 + real'(fine_phase) / 65536.0 / 4.0;   // per 16
    checks++;
    if (wrapr(tot - 16.0 * cfo) > 100.0 / 65536.0 || wrapr(tot - 16.0 * cfo) < -100.0 / 65536.0) begin
      failures++; $display("FAIL coarse+fine %f vs %f", tot * 65536.0, 16.0 * cfo * 65536.0);
    end
    a1 = $atan2(acc1_im, acc1_re);
    a2 = $atan2(acc2_im, acc2_re);
    checks++;
    if (wrapr((a2 - a1) / (2.0 * PI)) * 2.0 * PI > 0.15 ||
        wrapr((a2 - a1) / (2.0 * PI)) * 2.0 * PI < -0.15) begin
      failures++; $display("FAIL residual rotation %f rad over 300 samples (cfo %f)", a2 - a1, cfo);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    packet(0.0106, 0);       // +212 kHz, even-strong short symbols
    packet(-0.0106, 1);      // -212 kHz, odd-strong
    packet(0.0, 0);
    packet(0.025, 1);        // 500 kHz
    packet(-0.025, 0);
    for (int i = 0; i < 12; i++) begin
      real c;
      c = (real'($urandom_range(0, 5000)) - 2500.0) / 100000.0;
      packet(c, i % 2);
    end
    $display("even %0d, odd %0d packets", n_even, n_odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
