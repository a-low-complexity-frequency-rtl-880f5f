// tb_phase_acc: loads estimates and checks the per-word step against
// -phi * 4 / 495 turns (real arithmetic, to within 2^-24 turn rounding), the
// restart at pkt_start, that words without in_valid do not advance, and that
// a new estimate changes the step without a phase jump.
//
// The step formula follows the compensator description (one phasor per
// four samples); the tolerance is this testbench's own.
module tb_phase_acc;
  localparam int PHASE_W = 16, NCO_W = 24;
  logic clk = 0, rst_n = 0, in_valid = 0, pkt_start = 0, load = 0;
  logic signed [PHASE_W-1:0] est_phase = 0;
  logic [NCO_W-1:0] phase_out;
  logic signed [NCO_W-1:0] inc_out;
  int checks = 0, failures = 0;

  phase_acc #(.PHASE_W(PHASE_W), .NCO_W(NCO_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase in NCO units, modulo 2^24, compared with a tolerance
  function automatic bit close(longint got, real expv, real tol);
    real d = real'(got) - expv;
    d = d - 16777216.0 * $floor(d / 16777216.0 + 0.5);
    return (d <= tol && d >= -tol);
  endfunction

  initial begin
    real ph, step;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      int e;
      e = (k == 0) ? 26050 : (k == 1) ? -26050 : (k == 2) ? 32767 : (k == 3) ? -32768
              : int'($urandom_range(0, 65535)) - 32768;
      @(negedge clk);
      est_phase = PHASE_W'(e); load = 1;
      @(negedge clk); load = 0;
      step = -real'(e) * 4.0 / 495.0 * 256.0;    // 2^(24-16)
      checks++;
      if (!close(longint'(inc_out), step, 1.5)) begin
        failures++; $display("FAIL step for %0d: %0d vs %f", e, inc_out, step);
      end
      // packet: start word gets phase 0, then one step per valid word
      pkt_start = 1; in_valid = 1; ph = 0.0;
      for (int w = 0; w < 300; w++) begin
        #1;
        if (w == 0 || in_valid) begin
          checks++;
          if (!close(longint'(phase_out), ph, 1.5 * w + 1)) begin
            failures++; $display("FAIL word %0d: %0d vs %f", w, phase_out, ph);
          end
        end
        @(negedge clk);
        if (in_valid) ph += step;
        pkt_start = 0;
        in_valid = ($urandom_range(0, 3) != 0);
      end
      // new estimate mid-packet: phase continues, step changes
      in_valid = 1;
      @(negedge clk); ph += step;
      est_phase = est_phase / 2; load = 1;
      @(negedge clk); ph += step; load = 0;
      step = -real'(est_phase) * 4.0 / 495.0 * 256.0;
      for (int w = 0; w < 20; w++) begin
        #1;
        checks++;
        if (!close(longint'(phase_out), ph, 1000)) begin
          failures++; $display("FAIL after reload word %0d: %0d vs %f", w, phase_out, ph);
        end
        @(negedge clk); ph += step;
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
