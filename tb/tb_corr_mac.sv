// tb_corr_mac: checks the complex auto-correlation accumulator against sums
// of cur * conj(ref) worked out in the testbench, including clear priority,
// hold when disabled and the one-clock latency.
//
// The correlation rule follows the estimator description; stimulus and
// sequence are this testbench's own.
module tb_corr_mac;
  localparam int DATA_W = 4, ACC_W = 18;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic signed [DATA_W-1:0] cur_re, cur_im, ref_re, ref_im;
  logic signed [ACC_W-1:0]  acc_re, acc_im;
  int checks = 0, failures = 0;
  int exp_re, exp_im;

  corr_mac #(.DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (acc_re !== ACC_W'(exp_re) || acc_im !== ACC_W'(exp_im)) begin
      failures++;
      $display("FAIL %s: got %0d,%0dj exp %0d,%0dj", what, acc_re, acc_im, exp_re, exp_im);
    end
  endtask

  initial begin
    {cur_re, cur_im, ref_re, ref_im} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      @(negedge clk); clear = 1; en = 1; cur_re = 7;   // clear wins over en
      @(negedge clk); clear = 0; en = 0;
      exp_re = 0; exp_im = 0;
      check("after clear");
      for (int i = 0; i < 82; i++) begin
        @(negedge clk);
        en = ($urandom_range(0, 4) != 0);
        cur_re = DATA_W'($urandom); cur_im = DATA_W'($urandom);
        ref_re = DATA_W'($urandom); ref_im = DATA_W'($urandom);
        if (run == 5) begin  // extremes
          cur_re = -8; cur_im = -8; ref_re = -8; ref_im = 7;
        end
        if (en) begin
          exp_re += int'(cur_re) * int'(ref_re) + int'(cur_im) * int'(ref_im);
          exp_im += int'(cur_im) * int'(ref_re) - int'(cur_re) * int'(ref_im);
        end
        @(posedge clk); #1;
        check("running sum");
      end
      @(negedge clk); en = 0; cur_re = 3;
      @(posedge clk); #1;
      check("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
