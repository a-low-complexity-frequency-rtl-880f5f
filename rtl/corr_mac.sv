// corr_mac: complex auto-correlation accumulator of the CFO estimators.
//
// Each enabled cycle adds cur * conj(ref) to a complex accumulator, where ref
// is the earlier sample (read back from the register file) and cur is the
// sample one correlation distance later. A carrier offset rotates cur by a
// fixed angle against ref, so the angle of the sum is that rotation; with
// cur = ref * exp(j*theta) the product has angle +theta.
// clear (one cycle, takes priority) zeroes the sum; the sum appears one clock
// after the last enabled sample. ACC_W must hold 2*(2^(DATA_W-1))^2 times the
// number of products; the default 18 bits cover 82 products of 4-bit samples
// with room to spare.
//
// The single multiplier time-shared over the selected samples follows the
// synchronizer description; the conjugation order and word length are this
// design's own.
module corr_mac #(
  parameter int DATA_W = fsync_pkg::UWB_DATA_W,
  parameter int ACC_W  = 18
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] cur_re,
  input  logic signed [DATA_W-1:0] cur_im,
  input  logic signed [DATA_W-1:0] ref_re,
  input  logic signed [DATA_W-1:0] ref_im,
  output logic signed [ACC_W-1:0]  acc_re,
  output logic signed [ACC_W-1:0]  acc_im
);

  localparam int P_W = 2 * DATA_W + 1;

  logic signed [P_W-1:0] prod_re, prod_im;

  // (a + jb)(c - jd) = (ac + bd) + j(bc - ad)
  always_comb begin
    prod_re = P_W'(cur_re * ref_re) + P_W'(cur_im * ref_im);
    prod_im = P_W'(cur_im * ref_re) - P_W'(cur_re * ref_im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (clear) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (en) begin
      acc_re <= acc_re + ACC_W'(prod_re);
      acc_im <= acc_im + ACC_W'(prod_im);
    end
  end

endmodule
