// cfo_estimator: data-partition, power-aware CFO estimator of the UWB
// frequency synchronizer.
//
// Per packet it runs up to two correlation passes over the preamble on one
// shared datapath (data-partition controller, register file, one complex
// multiply-accumulate, one arc-tangent):
//   coarse pass: every LAMBDA_COARSE-th sample of symbols COARSE_SYM0 and
//                COARSE_SYM0+1, correlated with the samples three symbols
//                later; its angle only feeds the power-aware decision;
//   fine pass:   the same with LAMBDA_FINE = 4 on symbols FINE_SYM0 and
//                FINE_SYM0+1 (2 x 41 stored samples); run only when the
//                decision asks for it.
// The passes never overlap in time, which is what lets them share hardware.
// The result est_phase is the carrier rotation over DIST*SYM_LEN samples
// (0.9375 us), in turns (2^PHASE_W = one turn); a positive value means the
// received signal turns counter-clockwise.
//
// Interface: four samples per clock (in_valid, in_re/in_im); pkt_start marks
// the word holding preamble sample 0 on lane start_lane. est_valid pulses
// once per packet when est_phase is final. fine_ran tells whether this
// packet's fine pass ran. A new pkt_start while busy restarts the sequence.
//
// Symbol spacing, lambda values, two correlated symbols and the threshold rule
// follow the synchronizer description. Where in the preamble the two passes
// sit (symbols 0/1 and 6/7 against 3/4 and 9/10) is this design's choice.
module cfo_estimator #(
  parameter int LANES         = fsync_pkg::UWB_LANES,
  parameter int SYM_LEN       = fsync_pkg::UWB_SYM_LEN,
  parameter int DIST          = fsync_pkg::UWB_DIST,
  parameter int NUM_EST       = fsync_pkg::UWB_NUM_EST,
  parameter int LAMBDA_FINE   = fsync_pkg::UWB_LAMBDA_FINE,
  parameter int LAMBDA_COARSE = fsync_pkg::UWB_LAMBDA_COARSE,
  parameter int DATA_W        = fsync_pkg::UWB_DATA_W,
  parameter int PHASE_W       = fsync_pkg::PHASE_W,
  parameter int ACC_W         = 18,
  parameter int COARSE_SYM0   = 0,
  parameter int FINE_SYM0     = 6,
  localparam int LANE_W       = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [DATA_W-1:0]  in_re [LANES],
  input  logic signed [DATA_W-1:0]  in_im [LANES],
  input  logic                      pkt_start,
  input  logic [LANE_W-1:0]         start_lane,
  input  logic                      pa_enable,
  input  logic [PHASE_W-1:0]        thr,
  output logic signed [PHASE_W-1:0] est_phase,
  output logic                      est_valid,
  output logic                      est_have,
  output logic                      fine_ran,
  output logic signed [PHASE_W-1:0] coarse_phase,
  output fsync_pkg::est_state_t     state
);
  import fsync_pkg::*;

  localparam int DEPTH  = NUM_EST * (SYM_LEN / LAMBDA_FINE);
  localparam int ADDR_W = $clog2(DEPTH);

  // ---- sequencing ---------------------------------------------------------------
  logic pass_go, pass_fine, pass_busy, pass_done;
  logic [7:0] pass_sym0;
  logic atan_start, atan_busy, atan_done;
  logic signed [PHASE_W-1:0] atan_phase;
  logic decide, dec_valid, fine_on, fine_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= EST_IDLE;
      coarse_phase <= '0;
      fine_ran     <= 1'b0;
    end else begin
      unique case (state)
        EST_IDLE:   if (pkt_start && in_valid) state <= EST_COARSE;
        EST_COARSE: if (pass_done) state <= EST_C_ATAN;
        EST_C_ATAN: if (atan_done) begin
                      coarse_phase <= atan_phase;
                      state        <= EST_DECIDE;
                    end
        EST_DECIDE: if (dec_valid) begin
                      fine_ran <= fine_on;
                      state    <= fine_on ? EST_FINE : EST_IDLE;
                    end
        EST_FINE:   if (pass_done) state <= EST_F_ATAN;
        EST_F_ATAN: if (atan_done) state <= EST_IDLE;
        default:    state <= EST_IDLE;
      endcase
      if (pkt_start && in_valid && state != EST_IDLE)
        state <= EST_COARSE;               // abandon the old packet
      if (pkt_start && in_valid)
        fine_ran <= 1'b0;
    end
  end

  // Pass launches: the coarse pass starts with the packet, the fine pass as
  // soon as the decision wants it (its first sample is symbols later).
  always_comb begin
    pass_go   = 1'b0;
    pass_fine = 1'b0;
    pass_sym0 = 8'(COARSE_SYM0);
    if (pkt_start && in_valid) begin
      pass_go = 1'b1;
    end else if (state == EST_DECIDE && dec_valid && fine_on) begin
      pass_go   = 1'b1;
      pass_fine = 1'b1;
      pass_sym0 = 8'(FINE_SYM0);
    end
  end

  assign atan_start = pass_done && (state == EST_COARSE || state == EST_FINE);
  assign decide     = (state == EST_C_ATAN) && atan_done;
  assign fine_done  = (state == EST_F_ATAN) && atan_done;

  // ---- datapath -----------------------------------------------------------------
  logic                     sel_valid, sel_store;
  logic [ADDR_W-1:0]        sel_addr;
  logic signed [DATA_W-1:0] sel_re, sel_im, ref_re, ref_im;
  logic signed [ACC_W-1:0]  acc_re, acc_im;

  dp_controller #(
    .LANES(LANES), .SYM_LEN(SYM_LEN), .DIST(DIST), .NUM_EST(NUM_EST),
    .LAMBDA_FINE(LAMBDA_FINE), .LAMBDA_COARSE(LAMBDA_COARSE), .DATA_W(DATA_W)
  ) u_dp (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .pkt_start, .start_lane,
    .pass_go, .pass_fine, .pass_sym0, .pass_busy,
    .sel_valid, .sel_store, .sel_addr, .sel_re, .sel_im, .pass_done
  );

  sample_regfile #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_rf (
    .clk,
    .we(sel_valid && sel_store), .waddr(sel_addr), .wre(sel_re), .wim(sel_im),
    .raddr(sel_addr), .rre(ref_re), .rim(ref_im)
  );

  corr_mac #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .clear(pass_go), .en(sel_valid && !sel_store),
    .cur_re(sel_re), .cur_im(sel_im), .ref_re, .ref_im, .acc_re, .acc_im
  );

  // pass_done comes with the last correlated sample; the sum is complete one
  // clock later, when the arc-tangent samples it.
  logic atan_start_d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) atan_start_d <= 1'b0;
    else        atan_start_d <= atan_start;

  cordic_atan #(.IN_W(ACC_W), .PHASE_W(PHASE_W)) u_atan (
    .clk, .rst_n, .start(atan_start_d), .x(acc_re), .y(acc_im),
    .busy(atan_busy), .done(atan_done), .phase(atan_phase)
  );

  power_aware_decision #(.PHASE_W(PHASE_W)) u_pa (
    .clk, .rst_n, .pa_enable, .thr, .decide, .coarse_phase(atan_phase),
    .dec_valid, .fine_on, .fine_done, .fine_phase(atan_phase),
    .est_phase, .est_have, .est_valid
  );

endmodule
