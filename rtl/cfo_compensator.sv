// cfo_compensator: approximate-phasor CFO compensator of the UWB synchronizer.
//
// One phase accumulator and one phase-to-I/Q table produce one phasor per
// clock; LANES parallel complex multipliers apply it to the LANES samples of
// the word (528 MS/s as 4 x 132 MHz at the defaults). Only the multipliers are
// replicated.
// Pipeline: word in -> table read (register) -> multiply (register), so
// out_* belongs to the word that came in two clocks earlier; out_valid follows
// in_valid with the same delay. The table is addressed by the top LUT_W bits
// of the accumulator, rounded.
//
// Interface: in_valid/in_re/in_im as at the estimator; pkt_start restarts the
// accumulator at phase 0; load with est_phase (rotation over 3 symbols, in
// turns) sets the new step.
//
// The architecture (single ACC, single LUT, parallel multipliers) follows the
// synchronizer description; widths and latency are this design's own.
module cfo_compensator #(
  parameter int LANES    = fsync_pkg::UWB_LANES,
  parameter int SYM_LEN  = fsync_pkg::UWB_SYM_LEN,
  parameter int DIST     = fsync_pkg::UWB_DIST,
  parameter int DATA_W   = fsync_pkg::UWB_DATA_W,
  parameter int OUT_W    = fsync_pkg::UWB_DATA_W + 2,
  parameter int PHASE_W  = fsync_pkg::PHASE_W,
  parameter int NCO_W    = fsync_pkg::NCO_W,
  parameter int PHASOR_W = fsync_pkg::PHASOR_W,
  parameter int LUT_W    = 3 + fsync_pkg::LUT_IDX_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [DATA_W-1:0]  in_re [LANES],
  input  logic signed [DATA_W-1:0]  in_im [LANES],
  input  logic                      pkt_start,
  input  logic                      load,
  input  logic signed [PHASE_W-1:0] est_phase,
  output logic                      out_valid,
  output logic signed [OUT_W-1:0]   out_re [LANES],
  output logic signed [OUT_W-1:0]   out_im [LANES]
);

  logic [NCO_W-1:0]        phase;
  logic signed [NCO_W-1:0] inc;
  logic [LUT_W-1:0]        lut_addr;
  logic signed [PHASOR_W-1:0] cos_w, sin_w, cos_r, sin_r;
  logic signed [DATA_W-1:0] d_re [LANES];
  logic signed [DATA_W-1:0] d_im [LANES];
  logic                     v1;

  phase_acc #(
    .LANES(LANES), .SYM_LEN(SYM_LEN), .DIST(DIST), .PHASE_W(PHASE_W), .NCO_W(NCO_W)
  ) u_acc (
    .clk, .rst_n, .in_valid, .pkt_start, .load, .est_phase,
    .phase_out(phase), .inc_out(inc)
  );

  // round the accumulator to the table resolution (wraps modulo one turn)
  assign lut_addr = LUT_W'((phase + (NCO_W'(1) << (NCO_W - LUT_W - 1))) >> (NCO_W - LUT_W));

  sincos_lut #(.LUT_W(LUT_W), .PHASOR_W(PHASOR_W)) u_lut (
    .phase(lut_addr), .cos_o(cos_w), .sin_o(sin_w)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      cos_r     <= '0;
      sin_r     <= '0;
      for (int l = 0; l < LANES; l++) begin
        d_re[l] <= '0;
        d_im[l] <= '0;
      end
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        cos_r <= cos_w;
        sin_r <= sin_w;
        d_re  <= in_re;
        d_im  <= in_im;
      end
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    cplx_mult #(.DATA_W(DATA_W), .PHASOR_W(PHASOR_W), .OUT_W(OUT_W)) u_mul (
      .clk, .rst_n, .en(v1),
      .a_re(d_re[l]), .a_im(d_im[l]), .c(cos_r), .s(sin_r),
      .o_re(out_re[l]), .o_im(out_im[l])
    );
  end

endmodule
