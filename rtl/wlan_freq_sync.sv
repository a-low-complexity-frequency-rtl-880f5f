// wlan_freq_sync: reduced-correlation two-stage frequency synchronizer for
// IEEE 802.11a (20 MS/s, one sample per clock).
//
// Idea: the correlation-based CFO estimators normally multiply every preamble
// sample with its repetition. Here only half of the samples are used, and the
// half is chosen per packet: one short symbol is spent measuring whether the
// even- or odd-indexed samples carry more power; the stronger half of the next
// short symbols feeds the coarse estimate, the other half of the long symbols
// (whose power profile is the opposite one) feeds the fine estimate.
//
// Schedule, k = sample index from pkt_start (first sample of the power-
// detection short symbol; the earlier short symbols are left to packet
// detection and AGC):
//   k   0.. 15  power detection (sample_power_detector)
//   k  16.. 63  coarse: three short symbols, two correlations at distance 16,
//               8 products each of the chosen parity -> angle phi_c
//   k  96..223  the two long symbols, compensated with the coarse estimate;
//               fine: 32 products of the other parity at distance 64 -> phi_f
//   from k = 96 on every sample is rotated by the accumulated phase; the step
//   is -phi_c/16 per sample after the coarse estimate and
//   -(phi_c/16 + phi_f/64) once the fine estimate is ready (k of about 245).
// One register file (32 entries), one correlator and one arc-tangent are shared
// by the two stages, which never overlap. The compensator is one accumulator,
// the octant sin/cos table and one complex multiplier.
//
// Interface: in_valid/in_re/in_im; pkt_start with the first detection sample.
// out_* is the compensated stream, two clocks behind the input. coarse_phase
// (turns/2^16 per 16 samples) and fine_phase (per 64 samples) are the two
// estimates; coarse_valid and est_valid pulse when each is ready; odd_coarse
// is the parity the coarse stage used.
//
// The stage structure, the half-sample correlations, the sample-power
// decision and the compensation of the long symbols with the coarse estimate
// follow the synchronizer description. The packet timing interface, word
// lengths and the point where the fine estimate takes effect are this design's
// own.
module wlan_freq_sync #(
  parameter int DATA_W   = fsync_pkg::WLAN_DATA_W,
  parameter int OUT_W    = fsync_pkg::WLAN_DATA_W + 2,
  parameter int PHASE_W  = fsync_pkg::PHASE_W,
  parameter int NCO_W    = fsync_pkg::NCO_W,
  parameter int PHASOR_W = fsync_pkg::PHASOR_W,
  parameter int LUT_W    = 3 + fsync_pkg::LUT_IDX_W,
  parameter int ACC_W    = 2 * DATA_W + 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [DATA_W-1:0]  in_re,
  input  logic signed [DATA_W-1:0]  in_im,
  input  logic                      pkt_start,
  output logic                      out_valid,
  output logic signed [OUT_W-1:0]   out_re,
  output logic signed [OUT_W-1:0]   out_im,
  output logic signed [PHASE_W-1:0] coarse_phase,
  output logic                      coarse_valid,
  output logic signed [PHASE_W-1:0] fine_phase,
  output logic                      est_valid,
  output logic                      odd_coarse
);

  localparam int SL = fsync_pkg::WLAN_SHORT_LEN;   // 16
  localparam int LL = fsync_pkg::WLAN_LONG_LEN;    // 64
  localparam int K_COARSE0 = SL;                   // first coarse sample
  localparam int K_COARSE1 = 4 * SL;               // end of coarse window
  localparam int K_LONG0   = 4 * SL + fsync_pkg::WLAN_GI2_LEN;   // 96
  localparam int K_LONG1   = K_LONG0 + LL;         // 160
  localparam int K_LONG2   = K_LONG1 + LL;         // 224
  localparam int K_W = 10;
  localparam int DEPTH = LL / 2;

  // ---- sample index of the input and of the compensated stream ---------------
  logic [K_W-1:0] k, k_cur, k_d1, k_d2;
  logic           run, run_cur, v_d1;

  assign k_cur   = pkt_start ? '0 : k;
  assign run_cur = pkt_start | run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k    <= '0;
      run  <= 1'b0;
      k_d1 <= '0;
      k_d2 <= '0;
      v_d1 <= 1'b0;
    end else begin
      if (in_valid && run_cur) begin
        run <= 1'b1;
        if (k_cur != '1) k <= k_cur + 1'b1;
        else             k <= k_cur;
      end
      v_d1 <= in_valid;
      if (in_valid) k_d1 <= run_cur ? k_cur : '1;
      if (v_d1)     k_d2 <= k_d1;
    end
  end

  // ---- power detection ---------------------------------------------------------
  logic pd_done, pd_odd;
  logic [2*DATA_W+$clog2(SL)-1:0] even_sum, odd_sum;

  sample_power_detector #(.DATA_W(DATA_W), .LEN(SL)) u_pd (
    .clk, .rst_n, .clear(pkt_start && in_valid),
    .en(in_valid && run_cur && k_cur < K_W'(SL)),
    .re(in_re), .im(in_im), .even_sum, .odd_sum, .done(pd_done),
    .odd_stronger(pd_odd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                                   odd_coarse <= 1'b0;
    else if (in_valid && run && k == K_W'(K_COARSE0) && pd_done) odd_coarse <= pd_odd;
  end

  // parity used by each stage, valid from k = 16 on
  logic lam_c, lam_f;
  assign lam_c = (k == K_W'(K_COARSE0)) ? pd_odd : odd_coarse;
  assign lam_f = !odd_coarse;

  // ---- compensated stream (accumulator, table, multiplier) ---------------------
  logic [NCO_W-1:0]           acc, ph;
  logic signed [NCO_W-1:0]    inc;
  logic [LUT_W-1:0]           lut_addr;
  logic signed [PHASOR_W-1:0] cos_w, sin_w, cos_r, sin_r;
  logic signed [DATA_W-1:0]   d_re, d_im;
  logic signed [OUT_W-1:0]    c_re, c_im;

  assign ph       = (run_cur && k_cur >= K_W'(K_LONG0)) ? acc : '0;
  assign lut_addr = LUT_W'((ph + (NCO_W'(1) << (NCO_W - LUT_W - 1))) >> (NCO_W - LUT_W));

  sincos_lut #(.LUT_W(LUT_W), .PHASOR_W(PHASOR_W)) u_lut (
    .phase(lut_addr), .cos_o(cos_w), .sin_o(sin_w)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      cos_r <= '0;
      sin_r <= '0;
      d_re  <= '0;
      d_im  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_d1;
      if (in_valid) begin
        if (pkt_start)                    acc <= '0;
        else if (run && k >= K_W'(K_LONG0)) acc <= acc + inc;
        cos_r <= cos_w;
        sin_r <= sin_w;
        d_re  <= in_re;
        d_im  <= in_im;
      end
    end
  end

  cplx_mult #(.DATA_W(DATA_W), .PHASOR_W(PHASOR_W), .OUT_W(OUT_W)) u_mul (
    .clk, .rst_n, .en(v_d1), .a_re(d_re), .a_im(d_im), .c(cos_r), .s(sin_r),
    .o_re(c_re), .o_im(c_im)
  );
  assign out_re = c_re;
  assign out_im = c_im;

  // ---- shared correlator ---------------------------------------------------------
  // Coarse stage taps the raw input, fine stage the compensated output.
  logic c_store, c_corr, f_store, f_corr;
  logic [$clog2(DEPTH)-1:0] c_addr, f_addr;
  logic signed [DATA_W-1:0] f_re, f_im;

  always_comb begin
    c_store = in_valid && run && k >= K_W'(K_COARSE0) && k < K_W'(K_COARSE1) &&
              (k[0] == lam_c);
    c_corr  = c_store && k >= K_W'(K_COARSE0 + SL);
    c_addr  = ($clog2(DEPTH))'((k % K_W'(SL)) >> 1);
    // Fine stage: compensated samples, scaled back to DATA_W (drop the extra
    // fraction bit, saturate the rare sqrt(2) overshoot).
    f_store = out_valid && k_d2 >= K_W'(K_LONG0) && k_d2 < K_W'(K_LONG1) &&
              (k_d2[0] == lam_f);
    f_corr  = out_valid && k_d2 >= K_W'(K_LONG1) && k_d2 < K_W'(K_LONG2) &&
              (k_d2[0] == lam_f);
    f_addr  = ($clog2(DEPTH))'((k_d2 % K_W'(LL)) >> 1);
    f_re    = sat(c_re);
    f_im    = sat(c_im);
  end

  function automatic logic signed [DATA_W-1:0] sat(input logic signed [OUT_W-1:0] v);
    logic signed [OUT_W-1:0] h;
    h = (v + OUT_W'(1)) >>> (OUT_W - DATA_W - 1);
    if (h > OUT_W'((1 <<< (DATA_W - 1)) - 1))  return DATA_W'((1 <<< (DATA_W - 1)) - 1);
    if (h < -OUT_W'(1 <<< (DATA_W - 1)))       return DATA_W'(-(1 <<< (DATA_W - 1)));
    return DATA_W'(h);
  endfunction

  logic fine_sel;
  assign fine_sel = f_store || f_corr;

  logic                     rf_we, mac_en;
  logic [$clog2(DEPTH)-1:0] rf_addr;
  logic signed [DATA_W-1:0] s_re, s_im, ref_re, ref_im;
  logic signed [ACC_W-1:0]  acc_re, acc_im;

  always_comb begin
    if (fine_sel) begin
      rf_we = f_store; mac_en = f_corr; rf_addr = f_addr; s_re = f_re; s_im = f_im;
    end else begin
      // coarse: each short sample is compared with the one a symbol earlier
      // and then takes its place (two correlations over three symbols)
      rf_we = c_store; mac_en = c_corr; rf_addr = c_addr; s_re = in_re; s_im = in_im;
    end
  end

  sample_regfile #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_rf (
    .clk, .we(rf_we), .waddr(rf_addr), .wre(s_re), .wim(s_im),
    .raddr(rf_addr), .rre(ref_re), .rim(ref_im)
  );

  corr_mac #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n,
    .clear((pkt_start && in_valid) ||
           (out_valid && k_d2 == K_W'(K_LONG0))),
    .en(mac_en), .cur_re(s_re), .cur_im(s_im), .ref_re, .ref_im, .acc_re, .acc_im
  );

  // ---- arc-tangent and estimate sequencing -----------------------------------------
  logic c_last, f_last, c_last_d, f_last_d, atan_done, atan_busy, fine_pending;
  logic signed [PHASE_W-1:0] atan_phase;

  assign c_last = c_corr && k == K_W'(K_COARSE1 - 2 + 32'(lam_c));
  assign f_last = f_corr && k_d2 == K_W'(K_LONG2 - 2 + 32'(lam_f));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_last_d     <= 1'b0;
      f_last_d     <= 1'b0;
      fine_pending <= 1'b0;
      coarse_phase <= '0;
      fine_phase   <= '0;
      coarse_valid <= 1'b0;
      est_valid    <= 1'b0;
      inc          <= '0;
    end else begin
      c_last_d     <= c_last;
      f_last_d     <= f_last;
      coarse_valid <= 1'b0;
      est_valid    <= 1'b0;
      if (f_last_d) fine_pending <= 1'b1;
      if (pkt_start && in_valid) begin
        inc          <= '0;
        fine_pending <= 1'b0;
      end
      if (atan_done) begin
        if (fine_pending) begin
          fine_phase   <= atan_phase;
          fine_pending <= 1'b0;
          est_valid    <= 1'b1;
          // per-sample step: phi_c/16 + phi_f/64 turns, NCO_W-bit turns
          inc <= -((NCO_W'(coarse_phase) <<< (NCO_W - PHASE_W - 4)) +
                   (NCO_W'(atan_phase)   <<< (NCO_W - PHASE_W - 6)));
        end else begin
          coarse_phase <= atan_phase;
          coarse_valid <= 1'b1;
          inc <= -(NCO_W'(atan_phase) <<< (NCO_W - PHASE_W - 4));
        end
      end
    end
  end

  cordic_atan #(.IN_W(ACC_W), .PHASE_W(PHASE_W)) u_atan (
    .clk, .rst_n, .start(c_last_d || f_last_d), .x(acc_re), .y(acc_im),
    .busy(atan_busy), .done(atan_done), .phase(atan_phase)
  );

endmodule
