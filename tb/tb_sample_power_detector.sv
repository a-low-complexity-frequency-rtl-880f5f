// tb_sample_power_detector: random short symbols with a chosen stronger
// parity (and fully random ones); checks both power sums against sums worked
// out in the testbench, the stronger-parity flag, the tie rule, that done
// rises after 16 samples and that further samples are ignored.
//
// The even/odd split follows the synchronizer description; the tie rule
// checked is this design's own.
module tb_sample_power_detector;
  localparam int DATA_W = 8, LEN = 16;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic signed [DATA_W-1:0] re = 0, im = 0;
  logic [2*DATA_W+3:0] even_sum, odd_sum;
  logic done, odd_stronger;
  int checks = 0, failures = 0;

  sample_power_detector #(.DATA_W(DATA_W), .LEN(LEN)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int mode);   // 0 even strong, 1 odd strong, 2 random, 3 tie
    @(negedge clk); clear = 1; en = 0;
    @(negedge clk); clear = 0;
    for (int i = 0; m_cnt < LEN || i < LEN + 4; i++) begin
      int a, b;
      a = $urandom_range(0, 255) - 128;
      b = $urandom_range(0, 255) - 128;
      if (mode < 2 && ((m_cnt % 2 == 1) != (mode == 1))) begin a = a / 8; b = b / 8; end
      if (mode == 3) begin a = 5; b = -3; end
      en = ($urandom_range(0, 3) != 0) || m_cnt >= LEN;
      re = DATA_W'(a); im = DATA_W'(b);
      @(negedge clk);
    end
    en = 0;
  endtask

  // reference model runs alongside, from what is driven
  int m_even, m_odd, m_cnt;
  always @(posedge clk) begin
    if (clear) begin m_even = 0; m_odd = 0; m_cnt = 0; end
    else if (en && m_cnt < LEN) begin
      if (m_cnt % 2 == 1) m_odd += int'(re) * int'(re) + int'(im) * int'(im);
      else                m_even += int'(re) * int'(re) + int'(im) * int'(im);
      m_cnt++;
    end
  end

  task automatic check(int mode);
    #1;
    checks++;
    if (!done || int'(even_sum) != m_even || int'(odd_sum) != m_odd ||
        odd_stronger != (m_odd > m_even)) begin
      failures++;
      $display("FAIL sums %0d/%0d exp %0d/%0d, odd_stronger %0d done %0d", even_sum, odd_sum,
               m_even, m_odd, odd_stronger, done);
    end
    if (mode == 0 || mode == 1) begin
      checks++;
      if (odd_stronger != (mode == 1)) begin failures++; $display("FAIL parity decision"); end
    end
    if (mode == 3) begin
      checks++;
      if (odd_stronger) begin failures++; $display("FAIL tie must pick even"); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (done) begin failures++; $display("FAIL done after reset"); end
    for (int i = 0; i < 200; i++) begin
      int mode;
      mode = i % 4;
      run(mode);
      check(mode);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
