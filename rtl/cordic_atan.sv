// cordic_atan: arc-tangent circuit of the CFO estimators.
//
// Returns the angle of the complex correlation sum (x + jy) as a signed
// fraction of a turn, PHASE_W bits wide (2^PHASE_W = one turn). It is an
// iterative CORDIC in vectoring mode: a vector in the left half-plane is first
// turned by half a turn, then ITER micro-rotations by +-atan(2^-i) drive y to
// zero while the rotated angles are summed. One micro-rotation per clock: the
// estimators need one angle per pass, so a single iteration stage is enough.
//
// Timing: start (one cycle) samples x and y; done pulses ITER+1 clocks later,
// with phase held until the next start. busy is high in between.
// The table below holds round(atan(2^-i) / (2*pi) * 2^20), i = 0..15; the
// inputs get GUARD fraction bits so the shifted terms keep their precision.
//
// The synchronizer description names only an arc-tangent circuit; the CORDIC
// structure, its iteration count and output format are this design's own.
module cordic_atan #(
  parameter int IN_W    = 18,
  parameter int PHASE_W = fsync_pkg::PHASE_W,
  parameter int ITER    = 14
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic signed [IN_W-1:0]    x,
  input  logic signed [IN_W-1:0]    y,
  output logic                      busy,
  output logic                      done,
  output logic signed [PHASE_W-1:0] phase
);

  localparam int GUARD = 4;      // fraction bits against shift truncation
  localparam int W = IN_W + 2 + GUARD;  // CORDIC gain 1.65, pre-rotation
  localparam int Z_W = 20;       // table precision, then rounded to PHASE_W
  localparam logic [Z_W-1:0] ATAN_TAB [16] = '{
    20'd131072, 20'd77376, 20'd40884, 20'd20753, 20'd10417, 20'd5213, 20'd2607,
    20'd1304,   20'd652,   20'd326,   20'd163,   20'd81,    20'd41,   20'd20,
    20'd10,     20'd5
  };

  logic signed [W-1:0]   xr, yr;
  logic signed [Z_W-1:0] zr;
  logic [$clog2(ITER+1)-1:0] it;

  logic signed [W-1:0] xs, ys;
  always_comb begin
    xs = xr >>> it;
    ys = yr >>> it;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr    <= '0;
      yr    <= '0;
      zr    <= '0;
      it    <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      phase <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        it   <= '0;
        if (x < 0) begin
          xr <= -(W'(x) <<< GUARD);
          yr <= -(W'(y) <<< GUARD);
          zr <= {1'b1, {(Z_W-1){1'b0}}};   // half a turn
        end else begin
          xr <= W'(x) <<< GUARD;
          yr <= W'(y) <<< GUARD;
          zr <= '0;
        end
      end else if (busy) begin
        if (it == ($bits(it))'(ITER)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          if (PHASE_W >= Z_W)
            phase <= PHASE_W'(zr) <<< (PHASE_W - Z_W);
          else
            phase <= PHASE_W'((zr + Z_W'(1 <<< (Z_W - PHASE_W - 1))) >>> (Z_W - PHASE_W));
        end else begin
          if (yr >= 0) begin
            xr <= xr + ys;
            yr <= yr - xs;
            zr <= zr + Z_W'(ATAN_TAB[it[3:0]]);
          end else begin
            xr <= xr - ys;
            yr <= yr + xs;
            zr <= zr - Z_W'(ATAN_TAB[it[3:0]]);
          end
          it <= it + 1'b1;
        end
      end
    end
  end

  initial assert (ITER <= 16) else $error("cordic_atan: table holds 16 entries");

endmodule
