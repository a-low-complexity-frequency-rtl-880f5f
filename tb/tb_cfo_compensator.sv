// tb_cfo_compensator: streams random 4-lane words through the compensator
// with a loaded estimate and compares every output sample with
// 2 * x * exp(-j*2*pi*(phi/2^16)*4w/495) computed in real arithmetic (word w
// of the packet, same phasor for all four lanes), allowing one output LSB for
// table and rounding error. Checks the two-clock latency, out_valid, bubbles
// and a mid-packet estimate change.
//
// The one-phasor-per-word rule is the compensator's, as described for the
// synchronizer; the 1-LSB tolerance and the random stimulus are this
// testbench's own.
module tb_cfo_compensator;
  localparam int LANES = 4, DATA_W = 4, OUT_W = 6, PHASE_W = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0, pkt_start = 0, load = 0;
  logic signed [DATA_W-1:0] in_re [LANES];
  logic signed [DATA_W-1:0] in_im [LANES];
  logic signed [PHASE_W-1:0] est_phase = 0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_re [LANES];
  logic signed [OUT_W-1:0] out_im [LANES];
  int checks = 0, failures = 0;

  cfo_compensator #(.LANES(LANES), .DATA_W(DATA_W), .OUT_W(OUT_W), .PHASE_W(PHASE_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, queued per valid input word
  real exp_re [$];      // LANES entries per word
  real exp_im [$];
  real theta;            // compensation angle of the next word, in turns
  real step;             // per-word change

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      real er [LANES];
      real ei [LANES];
      if (exp_re.size() < LANES) begin
        checks++; failures++; $display("FAIL unexpected output");
      end else begin
        for (int l = 0; l < LANES; l++) begin
          er[l] = exp_re.pop_front();
          ei[l] = exp_im.pop_front();
        end
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (absr(real'(out_re[l]) - er[l]) > 1.01 || absr(real'(out_im[l]) - ei[l]) > 1.01) begin
            failures++;
            $display("FAIL lane %0d: got %0d,%0d exp %f,%f", l, out_re[l], out_im[l], er[l], ei[l]);
          end
        end
      end
    end
  end

  task automatic drive_word(bit start);
    real er [LANES];
    real ei [LANES];
    real c, s;
    pkt_start = start;
    in_valid = 1;
    if (start) theta = 0.0;
    c = $cos(2.0 * PI * theta);
    s = $sin(2.0 * PI * theta);
    for (int l = 0; l < LANES; l++) begin
      in_re[l] = DATA_W'($urandom); in_im[l] = DATA_W'($urandom);
      er[l] = 2.0 * (real'(in_re[l]) * c - real'(in_im[l]) * s);
      ei[l] = 2.0 * (real'(in_re[l]) * s + real'(in_im[l]) * c);
    end
    for (int l = 0; l < LANES; l++) begin
      exp_re.push_back(er[l]);
      exp_im.push_back(ei[l]);
    end
    theta += step;
  endtask

  initial begin
    int lat;
    for (int l = 0; l < LANES; l++) begin in_re[l] = 0; in_im[l] = 0; end
    theta = 0; step = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: one word, count clocks to out_valid
    @(negedge clk); drive_word(1);
    @(negedge clk); in_valid = 0; pkt_start = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
    for (int k = 0; k < 12; k++) begin
      int e;
      e = (k == 0) ? 26050 : (k == 1) ? -26050 : (k == 2) ? 32767 : (k == 3) ? 0
              : int'($urandom_range(0, 65535)) - 32768;
      @(negedge clk);
      in_valid = 0; pkt_start = 0;
      est_phase = PHASE_W'(e); load = 1;
      @(negedge clk); load = 0;
      step = -real'(e) / 65536.0 * 4.0 / 495.0;
      for (int w = 0; w < 600; w++) begin
        if (w > 0 && $urandom_range(0, 5) == 0) begin
          in_valid = 0; pkt_start = 0;
        end else
          drive_word(w == 0);
        if (w == 300) begin               // change of estimate mid-packet
          est_phase = est_phase / 2; load = 1;
        end else
          load = 0;
        @(negedge clk);
        if (w == 300)
          step = -real'(est_phase) / 65536.0 * 4.0 / 495.0;
      end
      in_valid = 0; load = 0; pkt_start = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (exp_re.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
