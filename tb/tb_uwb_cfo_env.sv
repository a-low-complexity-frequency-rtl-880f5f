// tb_uwb_cfo_env: the UWB synchronizer in the three carrier-offset
// environments used to choose the power-aware threshold:
//   TIV  constant offset (40 ppm),
//   SV   slow variation, 80 ppm within 50 ms,
//   FV   fast variation, 80 ppm within 5 ms,
// with one packet per millisecond (the packet spacing is this testbench's
// choice). Offsets are in ppm of 10.6 GHz, where 1 ppm = 10.6 kHz, i.e.
// 10.6 kHz * 0.9375 us = 0.00994 turn per 3 symbols. SV runs with the 10 ppm
// threshold, FV with the 2 ppm one, as the threshold study recommends; TIV with
// the 10 ppm one.
//
// Checks, packet by packet:
//  - fine_ran agrees with the threshold rule recomputed in the testbench from
//    the reported coarse estimate and the estimate in use,
//  - the estimate in use never lies further from the true offset than the
//    threshold plus the fine-estimation tolerance (600/2^16 turn),
//  - in TIV only the first packet runs the fine pass, in FV (16 ppm per
//    packet against a 2 ppm threshold) every packet does, and SV lies in
//    between (some packets skip, some run).
// The environments and thresholds follow the system study; the packet
// spacing, noise and tolerances are this testbench's own.
module tb_uwb_cfo_env;
  import uwb_sig_pkg::*;
  localparam int LANES = 4, DATA_W = 4, OUT_W = 6, PHASE_W = 16;
  localparam real PPM_TURN = 10.6e3 * 0.9375e-6;   // turns per 3 symbols per ppm
  localparam int NPKT = 24;
  logic clk = 0, rst_n = 0, in_valid = 0, pkt_start = 0, pa_enable = 1;
  logic signed [DATA_W-1:0] in_re [LANES];
  logic signed [DATA_W-1:0] in_im [LANES];
  logic [1:0] start_lane = 0;
  logic [PHASE_W-1:0] thr = 16'd6144;
  logic out_valid, est_valid, fine_ran;
  logic signed [OUT_W-1:0] out_re [LANES];
  logic signed [OUT_W-1:0] out_im [LANES];
  logic signed [PHASE_W-1:0] est_phase, coarse_phase;
  int checks = 0, failures = 0;
  bit have = 0;      // a fine estimate exists (kept across environments)
  int prev = 0;      // estimate in use

  uwb_freq_sync dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrapi(int d);
    int m;
    m = d & 16'hFFFF;
    return m >= 32768 ? m - 65536 : m;
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

  // one packet; returns whether the fine pass ran
  task automatic packet(real ppm, int thr_i, bit have, int prev, output bit ran);
    real cfo = ppm * PPM_TURN;
    uwb_packet p = new(2000, cfo, 2.3, 0.2);
    int lane = int'($urandom_range(0, LANES - 1));
    int nw = (p.len + lane) / LANES, truth;
    bit seen = 0, exp_fine;
    thr = PHASE_W'(thr_i);
    truth = $rtoi(cfo * 65536.0);
    for (int w = 0; w < nw + 4; w++) begin
      @(negedge clk);
      in_valid = (w < nw);
      pkt_start = (w == 0);
      start_lane = 2'(lane);
      for (int l = 0; l < LANES; l++) begin
        int k;
        k = w * LANES - lane + l;
        in_re[l] = (w < nw && k >= 0) ? DATA_W'(p.rx_re[k]) : '0;
        in_im[l] = (w < nw && k >= 0) ? DATA_W'(p.rx_im[k]) : '0;
      end
      @(posedge clk); #1;
      if (est_valid && !seen) begin
        seen = 1;
        exp_fine = !have || iabs(wrapi(int'(coarse_phase) - prev)) > thr_i;
        check(fine_ran == exp_fine, $sformatf("fine_ran %0d, rule %0d at %f ppm", fine_ran, exp_fine, ppm));
        check(iabs(wrapi(int'(est_phase) - truth)) <= thr_i + 600,
              $sformatf("estimate %0d, true %0d, threshold %0d (%f ppm)", est_phase, truth, thr_i, ppm));
      end
    end
    check(seen, "no estimate");
    ran = fine_ran;
  endtask

  // drift in ppm per packet; returns the number of fine passes
  task automatic environment(string name, real start_ppm, real step_ppm, int thr_i, output int nfine);
    bit ran;
    real ppm = start_ppm;
    nfine = 0;
    for (int i = 0; i < NPKT; i++) begin
      packet(ppm, thr_i, have, prev, ran);
      if (ran) nfine++;
      have = 1;
      prev = int'(est_phase);
      ppm += step_ppm;
      if (ppm > 44.0 || ppm < -44.0) step_ppm = -step_ppm;   // stay inside +-45 ppm
    end
    $display("%s: fine estimation in %0d of %0d packets", name, nfine, NPKT);
  endtask

  initial begin
    int n_tiv, n_sv, n_fv;
    for (int l = 0; l < LANES; l++) begin in_re[l] = 0; in_im[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    environment("TIV", 40.0, 0.0, fsync_pkg::UWB_THR_SV, n_tiv);
    environment("SV", -20.0, 1.6, fsync_pkg::UWB_THR_SV, n_sv);
    environment("FV", 20.0, -16.0, fsync_pkg::UWB_THR_FV, n_fv);
    // the first TIV packet is a fresh offset far from the last estimate
    check(n_tiv == 1, $sformatf("TIV: %0d fine passes, expected 1", n_tiv));
    check(n_sv > 1 && n_sv < NPKT, $sformatf("SV: %0d fine passes, expected some but not all", n_sv));
    check(n_fv == NPKT, $sformatf("FV: %0d fine passes, expected all", n_fv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
