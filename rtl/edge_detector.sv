// edge_detector: low-cost edge measure around a red or blue CFA sample.
//
// Eight window samples go in: the four green neighbours (left, right, up, down) and
// the four diagonal samples, which share one colour. Six absolute differences and
// five adders give
//   DH = |G_left - G_right| + |D_upleft - D_upright| + |D_downleft - D_downright|
//   DV = |G_up   - G_down | + |D_upleft - D_downleft| + |D_upright - D_downright|
//   TD = DH + DV
// A small DH means the image changes little along the row. The block is purely
// combinational; the green interpolator registers its decision.
//
// The document gives the operator counts (six absolute subtractors, five adders,
// eight inputs) and the outputs DH, DV and TD; which eight samples are paired is this
// design's choice, the one pairing of a 3 x 5 window that meets those counts.
module edge_detector #(
  parameter int unsigned DW = 8
) (
  input  logic [DW-1:0]   g_left, g_right, g_up, g_down,
  input  logic [DW-1:0]   d_ul, d_ur, d_dl, d_dr,
  output logic [DW+1:0]   dh,
  output logic [DW+1:0]   dv,
  output logic [DW+2:0]   td
);
  function automatic logic [DW-1:0] absdiff(input logic [DW-1:0] a, input logic [DW-1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [DW-1:0] ah0, ah1, ah2, av0, av1, av2;

  always_comb begin
    ah0 = absdiff(g_left, g_right);
    ah1 = absdiff(d_ul, d_ur);
    ah2 = absdiff(d_dl, d_dr);
    av0 = absdiff(g_up, g_down);
    av1 = absdiff(d_ul, d_dl);
    av2 = absdiff(d_ur, d_dr);
    dh  = (DW+2)'(ah0) + (DW+2)'(ah1) + (DW+2)'(ah2);
    dv  = (DW+2)'(av0) + (DW+2)'(av1) + (DW+2)'(av2);
    td  = (DW+3)'(dh) + (DW+3)'(dv);
  end
endmodule
