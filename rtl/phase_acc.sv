// phase_acc: single phase accumulator (ACC) of the UWB CFO compensator.
//
// The approximate phasor compensation keeps one phasor for LAMBDA consecutive
// samples, so with LANES = LAMBDA samples arriving per clock one phasor per
// clock suffices and a single accumulator serves all lanes. The estimator gives
// the rotation phi over DIST*SYM_LEN samples; the accumulator steps by
//   inc = -phi * LANES / (DIST*SYM_LEN)
// per input word, computed as -(phi * K) >> KS with
//   K = round(LANES * 2^(NCO_W - PHASE_W + KS) / (DIST*SYM_LEN)).
// Word w of the packet (w = 0 at pkt_start) gets phase w*inc, i.e. samples
// 4w..4w+3 are all corrected by exp(-j*2*pi*eps*4w*T). A new estimate (load)
// changes the step from the next word on without a phase jump; the constant
// phase left over is removed later by channel estimation.
//
// Interface: phase_out is the phase (NCO_W bits, one turn = 2^NCO_W) for the
// word presented in the same cycle (combinational from registers and
// pkt_start). inc_out shows the current step.
//
// The single accumulator and the 1/lambda phasor rate follow the compensator
// description; the constant-multiply scaling and word lengths are this
// design's own.
module phase_acc #(
  parameter int LANES   = fsync_pkg::UWB_LANES,
  parameter int SYM_LEN = fsync_pkg::UWB_SYM_LEN,
  parameter int DIST    = fsync_pkg::UWB_DIST,
  parameter int PHASE_W = fsync_pkg::PHASE_W,
  parameter int NCO_W   = fsync_pkg::NCO_W,
  parameter int KS      = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      pkt_start,
  input  logic                      load,
  input  logic signed [PHASE_W-1:0] est_phase,
  output logic [NCO_W-1:0]          phase_out,
  output logic signed [NCO_W-1:0]   inc_out
);

  localparam longint K = ((longint'(LANES) << (NCO_W - PHASE_W + KS)) +
                          longint'(DIST * SYM_LEN) / 2) / longint'(DIST * SYM_LEN);
  localparam int K_W = $clog2(K + 1) + 1;
  localparam int PR_W = PHASE_W + K_W;

  logic [NCO_W-1:0]        acc;
  logic signed [NCO_W-1:0] inc;
  logic signed [PR_W-1:0]  prod, scaled;

  always_comb begin
    prod   = PR_W'(est_phase) * PR_W'(K);
    scaled = (prod + PR_W'(1 <<< (KS - 1))) >>> KS;
  end

  assign phase_out = pkt_start ? '0 : acc;
  assign inc_out   = inc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      inc <= '0;
    end else begin
      if (in_valid)
        acc <= phase_out + inc;
      if (load)
        inc <= -NCO_W'(scaled);
    end
  end

endmodule
