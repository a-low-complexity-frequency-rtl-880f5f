// cplx_mult: one complex multiplier of the CFO compensator (sample x phasor).
//
// out = round((re + j*im) * (c + j*s) / 2^SHIFT) with
// SHIFT = PHASOR_W - 1 - (OUT_W - DATA_W - 1): the phasor's full scale is
// 2^(PHASOR_W-1), and the output keeps OUT_W - DATA_W - 1 bits below the input
// LSB (one bit at the defaults, 4-bit in, 6-bit out). A rotated sample never
// exceeds sqrt(2) times the input full scale, which the extra integer bit holds.
// Registered output, one clock of latency; en gates the register.
//
// The compensator uses one of these per parallel lane; the rounding and the
// output word length are this design's own.
module cplx_mult #(
  parameter int DATA_W   = fsync_pkg::UWB_DATA_W,
  parameter int PHASOR_W = fsync_pkg::PHASOR_W,
  parameter int OUT_W    = fsync_pkg::UWB_DATA_W + 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic signed [DATA_W-1:0]   a_re,
  input  logic signed [DATA_W-1:0]   a_im,
  input  logic signed [PHASOR_W-1:0] c,
  input  logic signed [PHASOR_W-1:0] s,
  output logic signed [OUT_W-1:0]    o_re,
  output logic signed [OUT_W-1:0]    o_im
);

  localparam int SHIFT = PHASOR_W - 1 - (OUT_W - DATA_W - 1);
  localparam int P_W   = DATA_W + PHASOR_W + 1;

  logic signed [P_W-1:0] p_re, p_im, r_re, r_im;

  always_comb begin
    p_re = P_W'(a_re * c) - P_W'(a_im * s);
    p_im = P_W'(a_re * s) + P_W'(a_im * c);
    r_re = (p_re + P_W'(1 <<< (SHIFT - 1))) >>> SHIFT;
    r_im = (p_im + P_W'(1 <<< (SHIFT - 1))) >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_re <= '0;
      o_im <= '0;
    end else if (en) begin
      o_re <= OUT_W'(r_re);
      o_im <= OUT_W'(r_im);
    end
  end

  initial assert (SHIFT >= 1) else $error("cplx_mult: OUT_W too wide for PHASOR_W");

endmodule
