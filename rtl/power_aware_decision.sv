// power_aware_decision: decides per packet whether the fine CFO estimation runs.
//
// A cheap coarse estimate is made on every packet only to judge how much the
// carrier offset has moved. If it differs from the last fine estimate by more
// than the threshold `thr` (or no fine estimate exists yet, or power-aware
// operation is off), the fine pass is switched on and its result becomes the
// new estimate; otherwise the fine pass stays off and the last fine estimate
// is used again. The coarse value itself is never used for compensation.
//
// Interface: decide (one cycle) with coarse_phase gives dec_valid one clock
// later with fine_on. fine_done (one cycle) with fine_phase stores the new
// estimate. est_phase is the estimate in use; est_valid pulses when est_phase
// is final for the current packet (after the decision if fine_on = 0, else one
// clock after fine_done). The phase difference is taken modulo one turn.
//
// The decision rule (|coarse - previous fine| > threshold) follows the
// synchronizer description; the handshake and the pa_enable switch are this
// design's own.
module power_aware_decision #(
  parameter int PHASE_W = fsync_pkg::PHASE_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      pa_enable,   // 0: fine estimation on every packet
  input  logic [PHASE_W-1:0]        thr,         // unsigned phase threshold
  input  logic                      decide,
  input  logic signed [PHASE_W-1:0] coarse_phase,
  output logic                      dec_valid,
  output logic                      fine_on,
  input  logic                      fine_done,
  input  logic signed [PHASE_W-1:0] fine_phase,
  output logic signed [PHASE_W-1:0] est_phase,
  output logic                      est_have,    // a fine estimate exists
  output logic                      est_valid
);

  logic signed [PHASE_W-1:0] diff;
  logic        [PHASE_W-1:0] mag;

  always_comb begin
    diff = coarse_phase - est_phase;     // wraps modulo one turn
    mag  = diff[PHASE_W-1] ? PHASE_W'(-diff) : PHASE_W'(diff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      fine_on   <= 1'b0;
      est_phase <= '0;
      est_have  <= 1'b0;
      est_valid <= 1'b0;
    end else begin
      dec_valid <= 1'b0;
      est_valid <= 1'b0;
      if (decide) begin
        dec_valid <= 1'b1;
        fine_on   <= !pa_enable || !est_have || (mag > thr);
        est_valid <= pa_enable && est_have && !(mag > thr);
      end
      if (fine_done) begin
        est_phase <= fine_phase;
        est_have  <= 1'b1;
        est_valid <= 1'b1;
      end
    end
  end

endmodule
