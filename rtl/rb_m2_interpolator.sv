// rb_m2_interpolator: red/blue interpolation, model 2.
//
// Used at a green CFA site for the chroma colour whose samples lie above and below
// it:
//   X = 1/2 (X_up + X_down) + 1/8 (4*G - G_ul - G_ur - G_dl - G_dr)
// where G is the centre green and G_ul..G_dr are the four diagonal greens. The
// window has no same-colour green above or below, so the Laplacian compensation
// uses the diagonal greens. Purely combinational; rounded and clamped.
//
// The document names the model and gives the Laplacian compensation and the weight
// set; the vertical role of this model and its equation are this design's own.
module rb_m2_interpolator
  import cfa_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  logic [DW-1:0] x_up, x_down,
  input  logic [DW-1:0] g_center, g_ul, g_ur, g_dl, g_dr,
  output logic [DW-1:0] x_out
);
  localparam int unsigned MAXV = (1 << DW) - 1;
  int total8;

  always_comb begin
    total8 = ((int'(x_up) + int'(x_down)) <<< 2)
           + (int'(g_center) <<< 2) - int'(g_ul) - int'(g_ur) - int'(g_dl) - int'(g_dr);
    x_out  = DW'(div8_clamp(total8, MAXV));
  end
endmodule
