// dp_controller: data-partition controller of the UWB CFO estimator.
//
// The receiver delivers LANES consecutive samples per clock. For one estimation
// pass the estimator needs only every LAMBDA-th sample of NUM_EST consecutive
// symbols (these are stored) and the samples exactly DIST symbols later (these
// are correlated with the stored ones). Because LAMBDA >= LANES, at most one of
// the wanted samples falls into any clock, so the controller picks one lane per
// cycle and hands a single sample to the narrow estimator datapath.
//
// How it works: `cur` is the packet-relative index of the sample on lane 0 of
// the current input word: -start_lane in the pkt_start word (so sample 0 of
// the packet is the one on lane start_lane), then LANES more per valid word. `target` is the index of the next
// wanted sample; when it lies inside the current word its lane is selected.
// Wanted indices are (sym0 + b + p*DIST)*SYM_LEN + LAMBDA*n for block
// b < NUM_EST, n < floor(SYM_LEN/LAMBDA), phase p = 0 (store) then 1
// (correlate); the register-file address is b*M + n in both phases.
//
// Interface: pass_go (one cycle) starts a pass with first symbol pass_sym0 and
// pass_fine choosing LAMBDA_FINE (else LAMBDA_COARSE); the pass must be
// started no later than the word holding its first sample. Outputs are
// registered: sel_* is valid one clock after the input word, and pass_done
// pulses with the last correlated sample.
//
// From the synchronizer description: lambda = 4 sampling of 165-sample symbols,
// 3-symbol correlation distance, two correlated symbols, one sample per clock
// picked from four data paths. The lane arithmetic and the pass interface are
// this design's own. rst_n is also the disable condition of the assertions
// below, which is why lint sees it used both asynchronously and synchronously.
module dp_controller #(
  parameter int LANES         = fsync_pkg::UWB_LANES,
  parameter int SYM_LEN       = fsync_pkg::UWB_SYM_LEN,
  parameter int DIST          = fsync_pkg::UWB_DIST,
  parameter int NUM_EST       = fsync_pkg::UWB_NUM_EST,
  parameter int LAMBDA_FINE   = fsync_pkg::UWB_LAMBDA_FINE,
  parameter int LAMBDA_COARSE = fsync_pkg::UWB_LAMBDA_COARSE,
  parameter int DATA_W        = fsync_pkg::UWB_DATA_W,
  localparam int M_FINE       = SYM_LEN / LAMBDA_FINE,
  localparam int ADDR_W       = $clog2(NUM_EST * M_FINE),
  localparam int LANE_W       = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sample stream
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_re [LANES],
  input  logic signed [DATA_W-1:0] in_im [LANES],
  input  logic                     pkt_start,   // with in_valid: first word of the packet
  input  logic [LANE_W-1:0]        start_lane,  // lane holding packet sample 0
  // pass control
  input  logic                     pass_go,
  input  logic                     pass_fine,
  input  logic [7:0]               pass_sym0,
  output logic                     pass_busy,
  // selected sample
  output logic                     sel_valid,
  output logic                     sel_store,   // 1: write to register file, 0: correlate
  output logic [ADDR_W-1:0]        sel_addr,
  output logic signed [DATA_W-1:0] sel_re,
  output logic signed [DATA_W-1:0] sel_im,
  output logic                     pass_done
);

  localparam int M_COARSE = SYM_LEN / LAMBDA_COARSE;
  localparam int IDX_W    = 16;

  logic signed [IDX_W-1:0] tbase, target, blk_base, first_base;
  logic [ADDR_W-1:0]       n_cnt, m_last, addr;
  logic [$clog2(NUM_EST+1)-1:0] b_cnt;
  logic                    phase_corr, active;
  logic [15:0]             lambda;

  // Pass state as seen this cycle: a pass_go takes effect at once, so the
  // first wanted sample may sit in the very word that starts the pass.
  logic signed [IDX_W-1:0] e_target, e_blk_base, e_first_base;
  logic [ADDR_W-1:0]       e_n, e_mlast, e_addr;
  logic [$clog2(NUM_EST+1)-1:0] e_b;
  logic                    e_phase, e_active;
  logic [15:0]             e_lambda;

  always_comb begin
    if (pass_go) begin
      e_active     = 1'b1;
      e_phase      = 1'b0;
      e_n          = '0;
      e_b          = '0;
      e_addr       = '0;
      e_lambda     = pass_fine ? 16'(LAMBDA_FINE) : 16'(LAMBDA_COARSE);
      e_mlast      = pass_fine ? ADDR_W'(M_FINE - 1) : ADDR_W'(M_COARSE - 1);
      e_target     = IDX_W'(pass_sym0) * IDX_W'(SYM_LEN);
      e_blk_base   = e_target;
      e_first_base = e_target;
    end else begin
      e_active     = active;
      e_phase      = phase_corr;
      e_n          = n_cnt;
      e_b          = b_cnt;
      e_addr       = addr;
      e_lambda     = lambda;
      e_mlast      = m_last;
      e_target     = target;
      e_blk_base   = blk_base;
      e_first_base = first_base;
    end
  end

  // Position of the wanted sample inside the current input word.
  logic signed [IDX_W-1:0] cur, off;
  logic                    hit;
  assign cur = pkt_start ? -IDX_W'(start_lane) : tbase;
  assign off = e_target - cur;
  assign hit = e_active && in_valid && (off >= 0) && (off < IDX_W'(LANES));

  assign pass_busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbase      <= '0;
      target     <= '0;
      blk_base   <= '0;
      first_base <= '0;
      n_cnt      <= '0;
      b_cnt      <= '0;
      m_last     <= '0;
      lambda     <= '0;
      phase_corr <= 1'b0;
      active     <= 1'b0;
      addr       <= '0;
      sel_valid  <= 1'b0;
      sel_store  <= 1'b0;
      sel_addr   <= '0;
      sel_re     <= '0;
      sel_im     <= '0;
      pass_done  <= 1'b0;
    end else begin
      sel_valid <= 1'b0;
      pass_done <= 1'b0;

      // Packet-relative index of lane 0 of the next word; saturates.
      if (in_valid && cur < IDX_W'(16'sh7000))
        tbase <= cur + IDX_W'(LANES);

      active     <= e_active;
      phase_corr <= e_phase;
      n_cnt      <= e_n;
      b_cnt      <= e_b;
      addr       <= e_addr;
      lambda     <= e_lambda;
      m_last     <= e_mlast;
      target     <= e_target;
      blk_base   <= e_blk_base;
      first_base <= e_first_base;

      if (hit) begin
        sel_valid <= 1'b1;
        sel_store <= !e_phase;
        sel_addr  <= e_addr;
        sel_re    <= in_re[off[LANE_W-1:0]];
        sel_im    <= in_im[off[LANE_W-1:0]];
        addr      <= e_addr + 1'b1;
        if (e_n != e_mlast) begin
          n_cnt  <= e_n + 1'b1;
          target <= e_target + IDX_W'(e_lambda);
        end else begin
          n_cnt <= '0;
          if (e_b != ($bits(b_cnt))'(NUM_EST - 1)) begin
            b_cnt    <= e_b + 1'b1;
            blk_base <= e_blk_base + IDX_W'(SYM_LEN);
            target   <= e_blk_base + IDX_W'(SYM_LEN);
          end else if (!e_phase) begin
            // All stored: continue DIST symbols after the first block.
            b_cnt      <= '0;
            phase_corr <= 1'b1;
            addr       <= '0;
            blk_base   <= e_first_base + IDX_W'(DIST * SYM_LEN);
            target     <= e_first_base + IDX_W'(DIST * SYM_LEN);
          end else begin
            active    <= 1'b0;
            pass_done <= 1'b1;
          end
        end
      end
    end
  end

  // The controller relies on never seeing two wanted samples in one word.
  initial begin
    assert (LAMBDA_FINE >= LANES && LAMBDA_COARSE >= LANES)
      else $error("dp_controller: LAMBDA must be at least LANES");
  end

  // A pass must start before its first wanted sample has gone by.
  property p_not_late;
    @(posedge clk) disable iff (!rst_n) (e_active && in_valid) |-> (off >= 0);
  endproperty
  assert property (p_not_late) else $error("dp_controller: wanted sample missed");

endmodule
