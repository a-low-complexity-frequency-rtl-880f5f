// uwb_freq_sync: low-complexity frequency synchronizer for 528 MS/s OFDM UWB.
//
// Corrects the carrier frequency offset of a 4-sample-per-clock stream
// (132 MHz clock) with two parts:
//  - cfo_estimator: data-partition (every 4th sample), power-aware estimation
//    of the rotation over three OFDM symbols from the preamble;
//  - cfo_compensator: one accumulator, one sin/cos table, four complex
//    multipliers; one phasor per clock serves four samples.
// The compensator starts each packet with the last estimate and switches to the
// new one as soon as the estimator delivers it, so later preamble symbols and
// all data are corrected with the current packet's estimate.
//
// Interface: in_valid, in_re[4], in_im[4]; pkt_start (from packet detection)
// marks the word holding the first preamble sample, on lane start_lane.
// out_* is the compensated stream, two clocks behind the input. est_phase is
// the rotation over 3*165 samples in turns/2^16 (frequency = est_phase/2^16 /
// 0.9375 us); est_valid pulses when it is final for the packet; fine_ran
// says whether the fine estimation ran for this packet. thr is the
// power-aware threshold (6144 = 10 ppm at 10.6 GHz for slowly varying CFO,
// 1229 = 2 ppm for fast variation); pa_enable = 0 runs fine estimation always.
//
// Structure follows the synchronizer description; packet framing, word
// lengths and the pass schedule are this design's own.
module uwb_freq_sync #(
  parameter int LANES   = fsync_pkg::UWB_LANES,
  parameter int SYM_LEN = fsync_pkg::UWB_SYM_LEN,
  parameter int DATA_W  = fsync_pkg::UWB_DATA_W,
  parameter int OUT_W   = fsync_pkg::UWB_DATA_W + 2,
  parameter int PHASE_W = fsync_pkg::PHASE_W,
  localparam int LANE_W = (LANES > 1) ? $clog2(LANES) : 1
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
  output logic                      out_valid,
  output logic signed [OUT_W-1:0]   out_re [LANES],
  output logic signed [OUT_W-1:0]   out_im [LANES],
  output logic signed [PHASE_W-1:0] est_phase,
  output logic                      est_valid,
  output logic                      fine_ran,
  output logic signed [PHASE_W-1:0] coarse_phase
);

  logic est_have;
  fsync_pkg::est_state_t est_state;

  cfo_estimator #(
    .LANES(LANES), .SYM_LEN(SYM_LEN), .DATA_W(DATA_W), .PHASE_W(PHASE_W)
  ) u_est (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .pkt_start, .start_lane,
    .pa_enable, .thr, .est_phase, .est_valid, .est_have, .fine_ran,
    .coarse_phase, .state(est_state)
  );

  cfo_compensator #(
    .LANES(LANES), .SYM_LEN(SYM_LEN), .DATA_W(DATA_W), .OUT_W(OUT_W),
    .PHASE_W(PHASE_W)
  ) u_comp (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .pkt_start,
    .load(est_valid), .est_phase, .out_valid, .out_re, .out_im
  );

endmodule
