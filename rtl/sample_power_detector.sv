// sample_power_detector: even/odd sample power detector of the 802.11a
// frequency synchronizer.
//
// The short training symbols do not carry constant power per sample, and
// whether the even- or the odd-indexed samples are the stronger ones depends
// on the channel. Over one short symbol (LEN samples) this block sums
// re^2 + im^2 separately for even and odd sample indices; odd_stronger tells
// which half to use for the coarse estimate (the fine estimate on the long
// symbols then uses the other half). A tie counts as even.
//
// Interface: clear (one cycle) empties both sums and the sample index (a
// sample enabled in the same cycle counts as index 0); every en cycle adds
// the sample to the sum of its index parity. After LEN samples the sums
// stop and done stays high; odd_stronger is valid while done is high.
//
// The even/odd split over one short symbol follows the synchronizer
// description; sum widths and the tie rule are this design's own.
module sample_power_detector #(
  parameter int DATA_W = fsync_pkg::WLAN_DATA_W,
  parameter int LEN    = fsync_pkg::WLAN_SHORT_LEN,
  localparam int SUM_W = 2 * DATA_W + $clog2(LEN)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] re,
  input  logic signed [DATA_W-1:0] im,
  output logic [SUM_W-1:0]         even_sum,
  output logic [SUM_W-1:0]         odd_sum,
  output logic                     done,
  output logic                     odd_stronger
);

  logic [$clog2(LEN+1)-1:0] cnt;
  logic [2*DATA_W-1:0]      pwr;

  always_comb pwr = (2*DATA_W)'(re * re) + (2*DATA_W)'(im * im);

  assign done         = (cnt == ($bits(cnt))'(LEN));
  assign odd_stronger = odd_sum > even_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      even_sum <= '0;
      odd_sum  <= '0;
    end else if (clear) begin
      // a sample arriving with clear is sample 0 of the new symbol
      cnt      <= en ? ($bits(cnt))'(1) : '0;
      even_sum <= en ? SUM_W'(pwr) : '0;
      odd_sum  <= '0;
    end else if (en && !done) begin
      cnt <= cnt + 1'b1;
      if (cnt[0]) odd_sum  <= odd_sum + SUM_W'(pwr);
      else        even_sum <= even_sum + SUM_W'(pwr);
    end
  end

endmodule
