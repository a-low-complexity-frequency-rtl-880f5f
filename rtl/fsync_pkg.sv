// fsync_pkg: constants and types shared by the OFDM frequency synchronizers.
//
// Phases are carried as signed fractions of a full turn: a PHASE_W-bit value p
// stands for the angle 2*pi*p/2^PHASE_W, so +-0.5 turn wraps naturally in two's
// complement. The UWB numbers (165-sample symbols, lambda = 4, correlation over
// three symbols, 4-bit samples, four parallel lanes at 132 MHz) follow the
// synchronizer description; the word lengths of phases, accumulators and the
// phasor table are this design's own choices.
package fsync_pkg;

  // ---- phase representation -------------------------------------------------
  localparam int PHASE_W   = 16;  // angle from the arc-tangent, in turns
  localparam int NCO_W     = 24;  // phase accumulator width, in turns
  localparam int PHASOR_W  = 8;   // signed cos/sin word out of the phasor table
  localparam int LUT_IDX_W = 7;   // table index inside one 45-degree octant

  // ---- UWB synchronizer -------------------------------------------------------
  localparam int UWB_LANES   = 4;    // samples per clock (528 MS/s at 132 MHz)
  localparam int UWB_SYM_LEN = 165;  // 32 CP + 128 FFT + 5 GI samples
  localparam int UWB_DIST    = 3;    // correlation distance in symbols (3NT)
  localparam int UWB_LAMBDA_FINE   = 4;   // data-partition factor, fine pass
  localparam int UWB_LAMBDA_COARSE = 64;  // data-partition factor, coarse pass
  localparam int UWB_NUM_EST = 2;    // symbols correlated per estimate ("twice")
  localparam int UWB_DATA_W  = 4;    // bits per I or Q sample
  // 10 ppm of the highest UWB carrier, about 100 kHz, as a phase over 3NT:
  // 2*pi*100e3*0.9375e-6 rad = 0.09375 turn = 6144 / 2^16.
  localparam int UWB_THR_SV = 6144;
  // 2 ppm, about 20 kHz: 0.01875 turn = 1229 / 2^16.
  localparam int UWB_THR_FV = 1229;

  // ---- IEEE 802.11a synchronizer ---------------------------------------------
  localparam int WLAN_SHORT_LEN = 16;
  localparam int WLAN_LONG_LEN  = 64;
  localparam int WLAN_GI2_LEN   = 32;
  localparam int WLAN_DATA_W    = 8;

  // Which passes the UWB estimator is running.
  typedef enum logic [2:0] {
    EST_IDLE,
    EST_COARSE,    // low-complexity pass that only decides
    EST_C_ATAN,
    EST_DECIDE,
    EST_FINE,      // full lambda = 4 pass
    EST_F_ATAN
  } est_state_t;

  // Round-to-nearest arithmetic shift right helper.
  function automatic longint signed rshift_round(input longint signed v, input int sh);
    if (sh <= 0) return v;
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

endpackage
