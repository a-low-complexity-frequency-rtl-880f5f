// sincos_lut: phase-to-I/Q lookup table of the CFO compensators.
//
// Maps a phase (LUT_W bits, 2^LUT_W = one turn) to cos and sin, both signed
// PHASOR_W-bit words with full scale 2^(PHASOR_W-1)-1. Only the first octant
// (0..45 degrees) is stored, and each entry holds cos and sin together, so one
// read gives a complete complex value:
//   T[j] = round(A*cos(j*pi/(4*2^IDX))), round(A*sin(j*pi/(4*2^IDX))),
//   j = 0 .. 2^IDX (2^IDX + 1 entries), A = 2^(PHASOR_W-1) - 1, IDX = LUT_W - 3.
// Inside a quadrant, angles above 45 degrees read entry 2^IDX - idx with cos
// and sin exchanged; the quadrant is then applied by sign changes and a swap.
// The table is built at elaboration from the formula. Purely combinational.
//
// The octant folding, the joint cos/sin word and the 45-degree exchange follow
// the compensator description; table depth and word length are this design's
// own choices.
module sincos_lut #(
  parameter int LUT_W    = 3 + fsync_pkg::LUT_IDX_W,
  parameter int PHASOR_W = fsync_pkg::PHASOR_W
) (
  input  logic [LUT_W-1:0]           phase,
  output logic signed [PHASOR_W-1:0] cos_o,
  output logic signed [PHASOR_W-1:0] sin_o
);

  localparam int IDX  = LUT_W - 3;
  localparam int NENT = (1 << IDX) + 1;
  localparam int AMP  = (1 << (PHASOR_W - 1)) - 1;

  typedef logic [2*PHASOR_W-1:0] tab_t [NENT];

  function automatic tab_t build_table();
    tab_t t;
    real  a;
    for (int j = 0; j < NENT; j++) begin
      a = 3.14159265358979323846 * real'(j) / (4.0 * real'(1 << IDX));
      t[j] = {PHASOR_W'($rtoi(real'(AMP) * $cos(a) + 0.5)),
              PHASOR_W'($rtoi(real'(AMP) * $sin(a) + 0.5))};
    end
    return t;
  endfunction

  localparam tab_t TABLE = build_table();

  logic [1:0]          quad;
  logic                upper;      // second octant of the quadrant
  logic [IDX-1:0]      idx;
  logic [IDX:0]        addr;
  logic signed [PHASOR_W-1:0] c, s, cq, sq;

  always_comb begin
    quad  = phase[LUT_W-1 -: 2];
    upper = phase[LUT_W-3];
    idx   = phase[IDX-1:0];
    addr  = upper ? ((IDX+1)'(1 << IDX) - (IDX+1)'(idx)) : (IDX+1)'(idx);
    {c, s} = TABLE[addr];
    // angle inside the quadrant
    if (upper) begin
      cq = s;
      sq = c;
    end else begin
      cq = c;
      sq = s;
    end
    unique case (quad)
      2'd0: begin cos_o =  cq; sin_o =  sq; end
      2'd1: begin cos_o = -sq; sin_o =  cq; end
      2'd2: begin cos_o = -cq; sin_o = -sq; end
      default: begin cos_o =  sq; sin_o = -cq; end
    endcase
  end

endmodule
