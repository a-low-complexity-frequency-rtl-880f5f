// tb_uwb_freq_sync: end-to-end test of the UWB synchronizer. Generated
// packets (preamble with a carrier offset, then data) go in four samples per
// clock; the compensated output is compared with the clean transmitted
// samples. Checks that
//  - the output keeps one word per clock at full rate (528 MS/s at 132 MHz),
//    on the clock after the one that captures the input word (two register
//    stages),
//  - after the estimate is in use, the rotation left between two windows
//    1000 samples apart matches the offset minus the estimate in use within
//    0.1 rad (with no compensation it would be up to 2*pi*0.45*1000/495 rad),
//  - the power-aware sequence (fine on, skipped, on again) shows on fine_ran.
//
// Rates, offsets and the power-aware rule follow the synchronizer
// description; tolerances and packet sequences are this testbench's own.
module tb_uwb_freq_sync;
  import uwb_sig_pkg::*;
  localparam int LAT = 2, LANES = 4, DATA_W = 4, OUT_W = 6, PHASE_W = 16, SYM_LEN = 165;
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
  int n_fine = 0, n_skip = 0;

  uwb_freq_sync dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrapr(real d);
    return d - $floor(d + 0.5);
  endfunction

  task automatic packet(real cfo, int lane, bit exp_fine);
    uwb_packet p = new(3300, cfo, 2.3, 0.2);
    int nw = (p.len + lane) / LANES, ow = 0, ev = -1, fo = -1, lo = -1;
    real a1_re = 0, a1_im = 0, a2_re = 0, a2_im = 0, d, e;
    bit  gap = 0;
    for (int w = 0; w < nw + 2; w++) begin
      @(negedge clk);
      in_valid = (w < nw); pkt_start = (w == 0); start_lane = 2'(lane);
      for (int l = 0; l < LANES; l++) begin
        int k;
        k = w * LANES - lane + l;
        in_re[l] = (w < nw && k >= 0) ? DATA_W'(p.rx_re[k]) : '0;
        in_im[l] = (w < nw && k >= 0) ? DATA_W'(p.rx_im[k]) : '0;
      end
      @(posedge clk); #1;
      if (est_valid) ev = w;
      if (out_valid && fo < 0) fo = w;
      if (out_valid) lo = w;
      if (fo >= 0 && w < fo + nw && !out_valid) gap = 1;
      if (out_valid) begin
        for (int l = 0; l < LANES; l++) begin
          int k;
          k = ow * LANES - lane + l;
          if (k >= 1800 && k < 2300) begin
            a1_re += real'(out_re[l]) * p.tx_re[k] + real'(out_im[l]) * p.tx_im[k];
            a1_im += real'(out_im[l]) * p.tx_re[k] - real'(out_re[l]) * p.tx_im[k];
          end
          if (k >= 2800 && k < 3300) begin
            a2_re += real'(out_re[l]) * p.tx_re[k] + real'(out_im[l]) * p.tx_im[k];
            a2_im += real'(out_im[l]) * p.tx_re[k] - real'(out_re[l]) * p.tx_im[k];
          end
        end
        ow++;
      end
    end
    @(negedge clk); in_valid = 0; pkt_start = 0;
    checks++;
    if (gap || ow != nw || fo != LAT - 1 || lo != nw + LAT - 2) begin
      failures++; $display("FAIL output rate: %0d words out for %0d in, gap %0d, first %0d", ow, nw, gap, fo);
    end
    checks++;
    if (ev < 0 || fine_ran != exp_fine) begin
      failures++; $display("FAIL est_valid at %0d, fine_ran %0d expected %0d", ev, fine_ran, exp_fine);
    end
    if (fine_ran) n_fine++; else n_skip++;
    // The expected residual is what is left of the offset after subtracting
    // the estimate in use; it is not zero when the power-aware rule keeps a
    // previous estimate that differs by less than the threshold.
    e = 2.0 * PI * (cfo - real'(est_phase) / 65536.0) * 1000.0 / 495.0;
    d = wrapr(($atan2(a2_im, a2_re) - $atan2(a1_im, a1_re) - e) / (2.0 * PI)) * 2.0 * PI;
    checks++;
    if (d > 0.1 || d < -0.1) begin
      failures++; $display("FAIL residual rotation %f rad (cfo %f, est %0d)", d, cfo, est_phase);
    end
  endtask

  initial begin
    for (int l = 0; l < LANES; l++) begin in_re[l] = 0; in_im[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    packet(0.3975, 0, 1);
    packet(0.3975, 3, 0);
    packet(0.39, 1, 0);
    packet(-0.3975, 2, 1);
    packet(0.1, 1, 1);
    packet(0.11, 0, 0);
    $display("fine %0d, skipped %0d", n_fine, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
