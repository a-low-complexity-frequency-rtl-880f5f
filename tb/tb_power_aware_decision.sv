// tb_power_aware_decision: drives sequences of coarse estimates and fine
// results and checks the fine-on decision against |coarse - last fine| > thr
// (computed modulo one turn in the testbench), the estimate kept when fine
// estimation is skipped, the first packet always running fine, pa_enable = 0
// forcing fine, and the est_valid timing.
//
// The threshold rule follows the power-aware description; the handshake
// timing checked is this design's own.
module tb_power_aware_decision;
  localparam int PHASE_W = 16;
  logic clk = 0, rst_n = 0;
  logic pa_enable = 1, decide = 0, fine_done = 0;
  logic [PHASE_W-1:0] thr = 16'd6144;
  logic signed [PHASE_W-1:0] coarse_phase = 0, fine_phase = 0, est_phase;
  logic dec_valid, fine_on, est_have, est_valid;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0;

  power_aware_decision #(.PHASE_W(PHASE_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  model_est;
  bit  model_have;

  task automatic pkt(int coarse, int fine, bit pa, int t);
    bit exp_on;
    int d;
    @(negedge clk);
    pa_enable = pa; thr = PHASE_W'(t);
    coarse_phase = PHASE_W'(coarse); decide = 1;
    d = int'(16'(coarse - model_est));
    if (d >= 32768) d -= 65536;
    if (d < 0) d = -d;
    exp_on = !pa || !model_have || (d > t);
    @(negedge clk); decide = 0;
    checks++;
    if (!dec_valid || fine_on != exp_on || est_valid != !exp_on) begin
      failures++;
      $display("FAIL decision: coarse %0d est %0d thr %0d got on=%0d exp %0d", coarse,
               model_est, t, fine_on, exp_on);
    end
    if (exp_on) begin
      n_on++;
      repeat (3) @(negedge clk);
      fine_phase = PHASE_W'(fine); fine_done = 1;
      @(negedge clk); fine_done = 0;
      model_est = int'(16'(fine)); model_have = 1;
      checks++;
      if (!est_valid || est_phase != PHASE_W'(fine) || !est_have) begin
        failures++; $display("FAIL fine update");
      end
    end else begin
      n_off++;
      checks++;
      if (est_phase != PHASE_W'(model_est)) begin
        failures++; $display("FAIL kept estimate %0d exp %0d", est_phase, model_est);
      end
    end
  endtask

  initial begin
    model_est = 0; model_have = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (est_have) begin failures++; $display("FAIL est_have after reset"); end
    pkt(100, 120, 1, 6144);              // first packet: fine always
    pkt(6000, 999, 1, 6144);             // within threshold: reuse
    pkt(6264, 999, 1, 6144);             // exactly at threshold: reuse
    pkt(6265, 6200, 1, 6144);            // beyond: fine
    pkt(6200 - 1229, 5000, 1, 1229);     // fast-variation threshold, at limit
    pkt(5000 + 1300, 6300, 1, 1229);     // beyond small threshold
    pkt(6300, 6310, 0, 6144);            // power-aware off: fine
    pkt(32000, -32000, 1, 6144);         // large jump
    pkt(32700, 0, 1, 6144);              // wraps: -32000 vs 32700 are close
    for (int i = 0; i < 300; i++)
      pkt($urandom_range(0, 65535), $urandom_range(0, 65535), ($urandom_range(0, 5) != 0),
          $urandom_range(0, 12000));
    checks++;
    if (n_on == 0 || n_off == 0) begin failures++; $display("FAIL coverage"); end
    $display("fine on %0d, skipped %0d", n_on, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
