// tb_sincos_lut: sweeps every table phase and compares cos/sin with the
// rounded real values 127*cos(2*pi*p/1024), 127*sin(2*pi*p/1024).
//
// The octant table follows the compensator description; the 10-bit phase and
// 8-bit phasor are this design's word lengths.
module tb_sincos_lut;
  localparam int LUT_W = 10, PHASOR_W = 8;
  localparam real PI = 3.14159265358979323846;
  logic [LUT_W-1:0] phase;
  logic signed [PHASOR_W-1:0] cos_o, sin_o;
  int checks = 0, failures = 0;

  sincos_lut #(.LUT_W(LUT_W), .PHASOR_W(PHASOR_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  initial begin
    for (int p = 0; p < (1 << LUT_W); p++) begin
      int ec, es;
      phase = LUT_W'(p);
      #1;
      ec = rnd(127.0 * $cos(2.0 * PI * p / 1024.0));
      es = rnd(127.0 * $sin(2.0 * PI * p / 1024.0));
      checks++;
      if (int'(cos_o) != ec || int'(sin_o) != es) begin
        failures++;
        $display("FAIL p=%0d: got %0d,%0d exp %0d,%0d", p, cos_o, sin_o, ec, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
