// freq_sync_top: the two OFDM frequency synchronizers side by side.
//
//  - uwb_*:  the 528 MS/s UWB synchronizer (four samples per 132 MHz clock):
//            data-partition, power-aware estimation over three band-hopped
//            symbols and approximate-phasor compensation.
//  - wlan_*: the 20 MS/s IEEE 802.11a synchronizer: sample-power detection,
//            half-sample coarse (short symbols) and fine (long symbols)
//            estimation, time-domain compensation.
// The two share no state and may run in different clock domains; each has its
// own clock and reset. See uwb_freq_sync and wlan_freq_sync for the timing of
// each port.
module freq_sync_top #(
  parameter int UWB_LANES   = fsync_pkg::UWB_LANES,
  parameter int UWB_DATA_W  = fsync_pkg::UWB_DATA_W,
  parameter int UWB_OUT_W   = fsync_pkg::UWB_DATA_W + 2,
  parameter int WLAN_DATA_W = fsync_pkg::WLAN_DATA_W,
  parameter int WLAN_OUT_W  = fsync_pkg::WLAN_DATA_W + 2,
  parameter int PHASE_W     = fsync_pkg::PHASE_W
) (
  // UWB synchronizer
  input  logic                          uwb_clk,
  input  logic                          uwb_rst_n,
  input  logic                          uwb_in_valid,
  input  logic signed [UWB_DATA_W-1:0]  uwb_in_re [UWB_LANES],
  input  logic signed [UWB_DATA_W-1:0]  uwb_in_im [UWB_LANES],
  input  logic                          uwb_pkt_start,
  input  logic [$clog2(UWB_LANES)-1:0]  uwb_start_lane,
  input  logic                          uwb_pa_enable,
  input  logic [PHASE_W-1:0]            uwb_thr,
  output logic                          uwb_out_valid,
  output logic signed [UWB_OUT_W-1:0]   uwb_out_re [UWB_LANES],
  output logic signed [UWB_OUT_W-1:0]   uwb_out_im [UWB_LANES],
  output logic signed [PHASE_W-1:0]     uwb_est_phase,
  output logic                          uwb_est_valid,
  output logic                          uwb_fine_ran,
  output logic signed [PHASE_W-1:0]     uwb_coarse_phase,
  // 802.11a synchronizer
  input  logic                          wlan_clk,
  input  logic                          wlan_rst_n,
  input  logic                          wlan_in_valid,
  input  logic signed [WLAN_DATA_W-1:0] wlan_in_re,
  input  logic signed [WLAN_DATA_W-1:0] wlan_in_im,
  input  logic                          wlan_pkt_start,
  output logic                          wlan_out_valid,
  output logic signed [WLAN_OUT_W-1:0]  wlan_out_re,
  output logic signed [WLAN_OUT_W-1:0]  wlan_out_im,
  output logic signed [PHASE_W-1:0]     wlan_coarse_phase,
  output logic                          wlan_coarse_valid,
  output logic signed [PHASE_W-1:0]     wlan_fine_phase,
  output logic                          wlan_est_valid,
  output logic                          wlan_odd_coarse
);

  uwb_freq_sync #(
    .LANES(UWB_LANES), .DATA_W(UWB_DATA_W), .OUT_W(UWB_OUT_W), .PHASE_W(PHASE_W)
  ) u_uwb (
    .clk(uwb_clk), .rst_n(uwb_rst_n), .in_valid(uwb_in_valid),
    .in_re(uwb_in_re), .in_im(uwb_in_im), .pkt_start(uwb_pkt_start),
    .start_lane(uwb_start_lane), .pa_enable(uwb_pa_enable), .thr(uwb_thr),
    .out_valid(uwb_out_valid), .out_re(uwb_out_re), .out_im(uwb_out_im),
    .est_phase(uwb_est_phase), .est_valid(uwb_est_valid), .fine_ran(uwb_fine_ran),
    .coarse_phase(uwb_coarse_phase)
  );

  wlan_freq_sync #(
    .DATA_W(WLAN_DATA_W), .OUT_W(WLAN_OUT_W), .PHASE_W(PHASE_W)
  ) u_wlan (
    .clk(wlan_clk), .rst_n(wlan_rst_n), .in_valid(wlan_in_valid),
    .in_re(wlan_in_re), .in_im(wlan_in_im), .pkt_start(wlan_pkt_start),
    .out_valid(wlan_out_valid), .out_re(wlan_out_re), .out_im(wlan_out_im),
    .coarse_phase(wlan_coarse_phase), .coarse_valid(wlan_coarse_valid),
    .fine_phase(wlan_fine_phase), .est_valid(wlan_est_valid),
    .odd_coarse(wlan_odd_coarse)
  );

endmodule
