// wlan_sig_pkg: test-signal generator for the 802.11a synchronizer testbenches.
//
// Builds the part of a received packet the synchronizer sees: four repeats
// of a 16-sample short symbol (the last four of the ten), a 32-sample guard
// interval copied from the end of the long symbol, two repeats of a 64-sample
// long symbol, then random data. Short-symbol samples of one parity are made
// stronger (`odd_strong` chooses which), the long symbol the other way round,
// as the preamble power analysis describes. The whole stream is rotated by
// `cfo` turns per sample, noise is added and it is quantised to 8 bits.
//
// Symbol lengths and the opposite power profiles follow the preamble
// description; the random symbol contents are this model's own.
package wlan_sig_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic int q8(real v);
    int r = $rtoi($floor(v + 0.5));
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  class wlan_packet;
    real tx_re [];
    real tx_im [];
    int  rx_re [];
    int  rx_im [];
    int  len;

    function new(int n_data, real cfo, bit odd_strong, real amp, real noise);
      real s_re [16];
      real s_im [16];
      real l_re [64];
      real l_im [64];
      len = 4 * 16 + 32 + 128 + n_data;
      tx_re = new[len]; tx_im = new[len]; rx_re = new[len]; rx_im = new[len];
      for (int k = 0; k < 16; k++) begin
        real g;
        g = ((k % 2 == 1) == odd_strong) ? 1.3 : 0.5;
        s_re[k] = amp * g * gauss();
        s_im[k] = amp * g * gauss();
      end
      for (int k = 0; k < 64; k++) begin
        real g;
        g = ((k % 2 == 1) == odd_strong) ? 0.5 : 1.3;
        l_re[k] = amp * g * gauss();
        l_im[k] = amp * g * gauss();
      end
      for (int k = 0; k < len; k++) begin
        if (k < 64) begin
          tx_re[k] = s_re[k % 16]; tx_im[k] = s_im[k % 16];
        end else if (k < 96) begin
          tx_re[k] = l_re[k - 64 + 32]; tx_im[k] = l_im[k - 64 + 32];
        end else if (k < 224) begin
          tx_re[k] = l_re[(k - 96) % 64]; tx_im[k] = l_im[(k - 96) % 64];
        end else begin
          tx_re[k] = amp * gauss(); tx_im[k] = amp * gauss();
        end
      end
      for (int k = 0; k < len; k++) begin
        real a, c, s;
        a = 2.0 * PI * cfo * real'(k);
        c = $cos(a); s = $sin(a);
        rx_re[k] = q8(tx_re[k] * c - tx_im[k] * s + noise * gauss());
        rx_im[k] = q8(tx_re[k] * s + tx_im[k] * c + noise * gauss());
      end
    endfunction
  endclass
endpackage
