// uwb_sig_pkg: test-signal generator for the UWB synchronizer testbenches.
//
// Builds a received preamble-plus-data stream: a random complex sequence with
// period 3*165 samples (the three band-hopped symbols of one time-frequency
// code repeat every three symbols), rotated by a carrier offset of `cfo`
// turns per 3*165 samples, with optional Gaussian noise, quantised to 4-bit
// two's-complement I and Q. The clean rotated-back reference (tx) is kept so
// a testbench can measure what is left after compensation.
//
// The 165-sample symbols and three-symbol repetition follow the system
// description; the random sequence, noise and amplitude are this model's own.
package uwb_sig_pkg;
  localparam real PI = 3.14159265358979323846;
  localparam int  PERIOD = 3 * 165;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic int q4(real v);
    int r = $rtoi($floor(v + 0.5));
    if (r > 7) r = 7;
    if (r < -8) r = -8;
    return r;
  endfunction

  class uwb_packet;
    real tx_re [];
    real tx_im [];
    int  rx_re [];
    int  rx_im [];
    int  len;

    // cfo: rotation over PERIOD samples in turns; amp: rms per component
    function new(int n, real cfo, real amp, real noise);
      real base_re [PERIOD];
      real base_im [PERIOD];
      len = n;
      tx_re = new[n]; tx_im = new[n]; rx_re = new[n]; rx_im = new[n];
      for (int k = 0; k < PERIOD; k++) begin
        base_re[k] = amp * gauss();
        base_im[k] = amp * gauss();
      end
      for (int k = 0; k < n; k++) begin
        real a = 2.0 * PI * cfo * real'(k) / real'(PERIOD);
        real c = $cos(a), s = $sin(a);
        tx_re[k] = base_re[k % PERIOD];
        tx_im[k] = base_im[k % PERIOD];
        rx_re[k] = q4(tx_re[k] * c - tx_im[k] * s + noise * gauss());
        rx_im[k] = q4(tx_re[k] * s + tx_im[k] * c + noise * gauss());
      end
    endfunction
  endclass
endpackage
