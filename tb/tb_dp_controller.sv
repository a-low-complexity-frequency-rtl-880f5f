// tb_dp_controller: each input sample carries its own packet index in its real
// part, so the testbench can check that the controller picks exactly the
// samples (b + p*3)*165 + lambda*n of a pass, on the right lane, in order,
// with the right store flag and register-file address, one clock after the
// word that holds them, and that pass_done comes with the last one. Covers
// all four start lanes, coarse (lambda = 64) and fine (lambda = 4) passes,
// passes started late in the packet, and input bubbles.
//
// The sample selection (every 4th or 64th sample, 3-symbol distance, two
// symbols) follows the data-partition description; the per-sample index
// trick (DATA_W = 12 so a sample can carry its index) is this testbench's.
module tb_dp_controller;
  localparam int LANES = 4, SYM_LEN = 165, DIST = 3, NUM_EST = 2;
  localparam int DATA_W = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, pkt_start = 0, pass_go = 0, pass_fine = 0;
  logic signed [DATA_W-1:0] in_re [LANES];
  logic signed [DATA_W-1:0] in_im [LANES];
  logic [1:0] start_lane = 0;
  logic [7:0] pass_sym0 = 0;
  logic pass_busy, sel_valid, sel_store, pass_done;
  logic [6:0] sel_addr;
  logic signed [DATA_W-1:0] sel_re, sel_im;
  int checks = 0, failures = 0;

  dp_controller #(.LANES(LANES), .SYM_LEN(SYM_LEN), .DIST(DIST), .NUM_EST(NUM_EST),
                  .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected selections of the running pass
  int exp_idx [$];
  int exp_addr [$];
  bit exp_store [$];
  int cur_word;       // packet word number driven this cycle, -1 for a bubble
  int cur_lane0;      // packet index of lane 0 of that word
  bit done_seen;

  task automatic plan(int sym0, int lambda);
    int m = SYM_LEN / lambda;
    for (int p = 0; p < 2; p++)
      for (int b = 0; b < NUM_EST; b++)
        for (int n = 0; n < m; n++) begin
          exp_idx.push_back((sym0 + b + p * DIST) * SYM_LEN + lambda * n);
          exp_addr.push_back(b * m + n);
          exp_store.push_back(p == 0);
        end
  endtask

  // monitor
  always @(posedge clk) begin
    #1;
    if (sel_valid) begin
      int e;
      checks++;
      if (exp_idx.size() == 0) begin
        failures++; $display("FAIL unexpected selection %0d", sel_re);
      end else begin
        e = exp_idx.pop_front();
        if (int'(sel_re) != e || int'(sel_im) != -e ||
            sel_addr != 7'(exp_addr.pop_front()) || sel_store != exp_store.pop_front()) begin
          failures++;
          $display("FAIL got idx %0d addr %0d store %0d, expected idx %0d", sel_re, sel_addr,
                   sel_store, e);
        end
        checks++;                       // one clock after the word that holds it
        if (cur_word < 0 || e < cur_lane0 || e >= cur_lane0 + LANES) begin
          failures++; $display("FAIL idx %0d selected at wrong time", e);
        end
        checks++;
        if (pass_done != (exp_idx.size() == 0)) begin
          failures++; $display("FAIL pass_done=%0d with %0d left", pass_done, exp_idx.size());
        end
      end
    end else if (pass_done) begin
      checks++; failures++; $display("FAIL pass_done without selection");
    end
    if (pass_done) done_seen = 1;
  end

  // one packet: optional fine pass launched at word `fine_at`
  task automatic packet(int lane, bit coarse, int fine_at, int fine_sym0, bit bubbles);
    int w = 0;
    done_seen = 0;
    exp_idx.delete(); exp_addr.delete(); exp_store.delete();
    if (coarse) plan(0, 64);
    while (w < 12 * SYM_LEN / LANES + 8) begin
      @(negedge clk);
      pass_go = 0; pkt_start = 0;
      if (bubbles && w > 0 && $urandom_range(0, 4) == 0) begin
        in_valid = 0; cur_word = -1;
        for (int l = 0; l < LANES; l++) begin in_re[l] = 'x; in_im[l] = 'x; end
        continue;
      end
      in_valid = 1;
      cur_word = w;
      cur_lane0 = LANES * w - lane;
      for (int l = 0; l < LANES; l++) begin
        in_re[l] = DATA_W'(cur_lane0 + l);
        in_im[l] = -DATA_W'(cur_lane0 + l);
      end
      if (w == 0) begin
        pkt_start = 1; start_lane = 2'(lane);
        if (coarse) begin pass_go = 1; pass_fine = 0; pass_sym0 = 0; end
      end
      if (w == fine_at) begin
        pass_go = 1; pass_fine = 1; pass_sym0 = 8'(fine_sym0);
        plan(fine_sym0, 4);
      end
      w++;
    end
    @(negedge clk); in_valid = 0; cur_word = -1;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_idx.size() != 0 || !done_seen) begin
      failures++; $display("FAIL %0d selections missing", exp_idx.size());
    end
  endtask

  initial begin
    for (int l = 0; l < LANES; l++) begin in_re[l] = 0; in_im[l] = 0; end
    cur_word = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int lane = 0; lane < 4; lane++) begin
      packet(lane, 1, 200, 6, 0);          // coarse then fine, as the estimator does
      packet(lane, 0, 0, 1, 1);            // fine only, with bubbles
      packet(lane, 1, 230, 6, 1);
    end
    packet(3, 0, 100, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
