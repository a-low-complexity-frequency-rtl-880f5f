// sample_regfile: register file holding the partitioned samples of the UWB
// CFO estimator.
//
// DEPTH complex samples of DATA_W bits per component (82 x 4 bit x I/Q = 656
// bits at the defaults). It is an addressed register file rather than a shift
// register: each sample is written once and read once, so only one word
// toggles per access. One synchronous write port and one asynchronous read
// port; a read of the address being written returns the old contents.
//
// Depth, width and the register-file choice follow the synchronizer
// description; the port arrangement is this design's own.
module sample_regfile #(
  parameter int DATA_W = fsync_pkg::UWB_DATA_W,
  parameter int DEPTH  = fsync_pkg::UWB_NUM_EST *
                         (fsync_pkg::UWB_SYM_LEN / fsync_pkg::UWB_LAMBDA_FINE),
  localparam int ADDR_W = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [ADDR_W-1:0]        waddr,
  input  logic signed [DATA_W-1:0] wre,
  input  logic signed [DATA_W-1:0] wim,
  input  logic [ADDR_W-1:0]        raddr,
  output logic signed [DATA_W-1:0] rre,
  output logic signed [DATA_W-1:0] rim
);

  logic [2*DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH)
      mem[waddr] <= {wre, wim};
  end

  always_comb begin
    if (32'(raddr) < DEPTH)
      {rre, rim} = mem[raddr];
    else
      {rre, rim} = '0;
  end

endmodule
