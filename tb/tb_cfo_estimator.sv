// tb_cfo_estimator: feeds generated UWB preambles with known carrier offsets
// into the estimator and checks
//  - the estimate against the true rotation over 3 symbols (within 600/2^16
//    turn, about 3.4 kHz),
//  - the power-aware sequence: first packet runs fine estimation, a packet with
//    the same offset skips it and keeps the old estimate, a moved offset turns
//    it on again, pa_enable = 0 always runs it,
//  - the clock at which est_valid appears (19 clocks after the word holding
//    the last sample of the deciding pass),
//  - all four start lanes and the full +-0.45 turn range.
//
// Offsets, thresholds (10 ppm and 2 ppm) and the 3-symbol distance follow the
// synchronizer description; tolerances and the packet sequence are this
// testbench's own.
module tb_cfo_estimator;
  import uwb_sig_pkg::*;
  localparam int LANES = 4, DATA_W = 4, PHASE_W = 16, SYM_LEN = 165;
  logic clk = 0, rst_n = 0, in_valid = 0, pkt_start = 0, pa_enable = 1;
  logic signed [DATA_W-1:0] in_re [LANES];
  logic signed [DATA_W-1:0] in_im [LANES];
  logic [1:0] start_lane = 0;
  logic [PHASE_W-1:0] thr = 16'd6144;
  logic signed [PHASE_W-1:0] est_phase, coarse_phase;
  logic est_valid, est_have, fine_ran;
  fsync_pkg::est_state_t state;
  int checks = 0, failures = 0;
  int n_fine = 0, n_skip = 0;

  cfo_estimator dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrapdiff(int a, int b);
    int d = int'(16'(a - b));
    return (d >= 32768) ? d - 65536 : d;
  endfunction

  // one packet; returns whether fine ran
  task automatic packet(real cfo, int lane, bit exp_fine, int exp_est);
    uwb_packet p = new(12 * SYM_LEN + 8, cfo, 2.3, 0.2);
    int w = 0, got_cycle = -1, est_seen = 0, exp_cycle, last_idx;
    int truth = $rtoi($floor(cfo * 65536.0 + 0.5));
    while (w * LANES - lane < p.len - LANES) begin
      @(negedge clk);
      in_valid = 1; pkt_start = (w == 0); start_lane = 2'(lane);
      for (int l = 0; l < LANES; l++) begin
        int k = w * LANES - lane + l;
        in_re[l] = (k >= 0) ? DATA_W'(p.rx_re[k]) : '0;
        in_im[l] = (k >= 0) ? DATA_W'(p.rx_im[k]) : '0;
      end
      @(posedge clk); #1;
      if (est_valid) begin got_cycle = w; est_seen++; end
      w++;
    end
    @(negedge clk); in_valid = 0; pkt_start = 0;
    repeat (30) @(negedge clk);
    last_idx = exp_fine ? (6 + 1 + 3) * SYM_LEN + 160 : (0 + 1 + 3) * SYM_LEN + 64;
    exp_cycle = (last_idx + lane) / LANES + 18;   // est_valid seen after edge of word+18
    checks++;
    if (est_seen != 1 || got_cycle != exp_cycle) begin
      failures++;
      $display("FAIL est_valid %0d times, at word %0d, expected once at %0d", est_seen,
               got_cycle, exp_cycle);
    end
    checks++;
    if (fine_ran != exp_fine) begin
      failures++; $display("FAIL fine_ran=%0d expected %0d (cfo %f)", fine_ran, exp_fine, cfo);
    end
    if (fine_ran) n_fine++; else n_skip++;
    checks++;
    if (exp_fine) begin
      if (wrapdiff(int'(est_phase), truth) > 600 || wrapdiff(int'(est_phase), truth) < -600) begin
        failures++; $display("FAIL estimate %0d, truth %0d", est_phase, truth);
      end
    end else if (int'(est_phase) != exp_est) begin
      failures++; $display("FAIL kept estimate %0d, expected %0d", est_phase, exp_est);
    end
    checks++;                       // the coarse pass saw roughly the same offset
    if (wrapdiff(int'(coarse_phase), truth) > 4000 || wrapdiff(int'(coarse_phase), truth) < -4000) begin
      failures++; $display("FAIL coarse %0d, truth %0d", coarse_phase, truth);
    end
  endtask

  initial begin
    int prev;
    for (int l = 0; l < LANES; l++) begin in_re[l] = 0; in_im[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    packet(0.3975, 0, 1, 0);           // 424 kHz: first packet, fine on
    prev = int'(est_phase);
    packet(0.3975, 1, 0, prev);        // same offset: fine skipped, estimate kept
    packet(0.40, 2, 0, prev);          // small drift below 10 ppm: skipped
    packet(-0.2, 3, 1, 0);             // moved: fine on
    prev = int'(est_phase);
    pa_enable = 0;
    packet(-0.2, 0, 1, 0);             // power-aware off: always fine
    pa_enable = 1;
    thr = 16'd1229;                    // fast-variation threshold
    packet(-0.2 + 0.05, 1, 1, 0);
    for (int i = 0; i < 10; i++) begin
      real c, d;
      do begin                         // far enough from the last estimate
        c = (real'($urandom_range(0, 900)) - 450.0) / 1000.0;
        d = c - real'(prev) / 65536.0;
        d = d - $floor(d + 0.5);
      end while (d < 0.15 && d > -0.15);
      thr = 16'd6144;
      packet(c, i % 4, 1, 0);
      prev = int'(est_phase);
      if (i % 3 == 0) packet(c, (i + 1) % 4, 0, prev);
    end
    $display("fine passes %0d, skipped %0d", n_fine, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
