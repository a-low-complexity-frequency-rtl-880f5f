// tb_cordic_atan: compares the CORDIC arc-tangent with atan2 computed in real
// arithmetic, over random vectors in all four quadrants and the axes, and
// checks the ITER+1 clock latency.
//
// The description names only an arc-tangent; the +-3 LSB tolerance is this
// testbench's own.
module tb_cordic_atan;
  localparam int IN_W = 18, PHASE_W = 16, ITER = 14;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [IN_W-1:0] x, y;
  logic busy, done;
  logic signed [PHASE_W-1:0] phase;
  int checks = 0, failures = 0;

  cordic_atan #(.IN_W(IN_W), .PHASE_W(PHASE_W), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int xi, int yi);
    real ang;
    int  expv, diff, lat;
    @(negedge clk);
    x = IN_W'(xi); y = IN_W'(yi); start = 1;
    @(negedge clk); start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    ang  = $atan2(real'(yi), real'(xi)) / (2.0 * PI) * 65536.0;
    expv = $rtoi(ang + (ang >= 0 ? 0.5 : -0.5));
    diff = int'(16'(phase - 16'(expv)));
    diff = (diff > 32767) ? diff - 65536 : diff;
    checks++;
    if (diff > 3 || diff < -3) begin
      failures++;
      $display("FAIL atan(%0d,%0d): got %0d exp %0d", yi, xi, phase, expv);
    end
    checks++;
    if (lat != ITER + 1) begin   // done rises ITER+1 clocks after the start edge
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    x = 0; y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(1000, 0); one(0, 1000); one(-1000, 0); one(0, -1000);
    one(-1000, 1); one(-1000, -1); one(5000, 5000); one(-5000, 5000);
    for (int i = 0; i < 400; i++) begin
      int xi, yi;
      do begin
        xi = $urandom_range(0, 2 * 60000) - 60000;
        yi = $urandom_range(0, 2 * 60000) - 60000;
      end while (xi * xi + yi * yi < 2000 * 2000);
      one(xi, yi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
