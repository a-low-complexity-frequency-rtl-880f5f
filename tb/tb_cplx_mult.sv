// tb_cplx_mult: random samples times random phasors, compared with the
// product rounded to nearest in real arithmetic; checks the one-clock
// latency and that en=0 holds the output.
//
// Rounding to nearest is this design's choice and is what is checked.
module tb_cplx_mult;
  localparam int DATA_W = 4, PHASOR_W = 8, OUT_W = 6;
  localparam int SHIFT = PHASOR_W - 1 - (OUT_W - DATA_W - 1);
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [DATA_W-1:0] a_re, a_im;
  logic signed [PHASOR_W-1:0] c, s;
  logic signed [OUT_W-1:0] o_re, o_im;
  int checks = 0, failures = 0;

  cplx_mult #(.DATA_W(DATA_W), .PHASOR_W(PHASOR_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  initial begin
    int er, ei, pr, pi_;
    {a_re, a_im, c, s} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      real ang;
      @(negedge clk);
      en = 1;
      a_re = DATA_W'($urandom); a_im = DATA_W'($urandom);
      // phasors on the unit circle, as the table delivers them
      ang = 6.283185307179586 * real'($urandom_range(0, 1023)) / 1024.0;
      c = PHASOR_W'($rtoi($floor(127.0 * $cos(ang) + 0.5)));
      s = PHASOR_W'($rtoi($floor(127.0 * $sin(ang) + 0.5)));
      er = rnd(real'(int'(a_re) * int'(c) - int'(a_im) * int'(s)) / real'(1 << SHIFT));
      ei = rnd(real'(int'(a_re) * int'(s) + int'(a_im) * int'(c)) / real'(1 << SHIFT));
      @(posedge clk); #1;
      checks++;
      if (int'(o_re) != er || int'(o_im) != ei) begin
        failures++;
        $display("FAIL (%0d,%0dj)*(%0d,%0dj): got %0d,%0dj exp %0d,%0dj",
                 a_re, a_im, c, s, o_re, o_im, er, ei);
      end
      pr = int'(o_re); pi_ = int'(o_im);
      if (i % 50 == 0) begin
        @(negedge clk); en = 0; a_re = ~a_re;
        @(posedge clk); #1;
        checks++;
        if (int'(o_re) != pr || int'(o_im) != pi_) begin
          failures++;
          $display("FAIL hold");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
