// sp_distance -- FP-SLIC pixel-to-centre distance.
//
// SLIC measures D = d_lab + (m/S) * d_xy with Euclidean distances in CIELAB
// colour and image position.  FP-SLIC keeps the pixels in RGB and replaces
// both Euclidean norms by Manhattan distances (document Eq. 5-7):
//   d_rgb = |r_k - r_i| + |g_k - g_i| + |b_k - b_i|
//   d_xy  = |x_k - x_i| + |y_k - y_i|
//   D     = d_rgb + (m/S) * d_xy
// The factor m/S is not an integer (m = 80, S = 9 in the main setting), so
// this unit computes D in fixed point with F fractional bits:
//   D' = d_rgb * 2^F + round(m * 2^F / S) * d_xy
// which orders candidates as D does up to the rounding of m/S.  The
// fixed-point format is this design's choice; the document gives none.
// The update unit runs nine of these in parallel.  Purely combinational.
module sp_distance
  import fp_slic_pkg::*;
#(
  parameter int M    = 80,  // compactness m (Sec. V)
  parameter int S    = 9,   // grid spacing S
  parameter int F    = 4,   // fractional bits of m/S
  parameter int DISTW = 24
) (
  input  chan_t  pr, pg, pb,
  input  coord_t px, py,
  input  chan_t  cr, cg, cb,
  input  coord_t cx, cy,
  output logic [DISTW-1:0] distance
);

  localparam int WGT = (M * (1 << F) + S / 2) / S;

  function automatic logic [PW-1:0] absdiff(input logic [PW-1:0] a, input logic [PW-1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [PW+1:0] d_rgb, d_xy;

  always_comb begin
    d_rgb = (PW+2)'(absdiff(PW'(pr), PW'(cr)))
          + (PW+2)'(absdiff(PW'(pg), PW'(cg)))
          + (PW+2)'(absdiff(PW'(pb), PW'(cb)));
    d_xy  = (PW+2)'(absdiff(px, cx)) + (PW+2)'(absdiff(py, cy));
    distance  = (DISTW'(d_rgb) << F) + DISTW'(WGT) * DISTW'(d_xy);
  end

endmodule
