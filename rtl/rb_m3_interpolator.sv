// rb_m3_interpolator: red/blue interpolation, model 3.
//
// Used at a red site to make blue, and at a blue site to make red; the missing
// colour lies on the four diagonals:
//   X = 1/4 (X_ul + X_ur + X_dl + X_dr) + 1/8 (4*G^ - G_left - G_right - G_up - G_down)
// where G^ is the green just interpolated at the centre by the green interpolator
// and the other four are the CFA greens around it. The compensation is a Laplacian
// of the green plane that combines original and interpolated greens.
// Purely combinational; rounded and clamped.
//
// The document names the model, says red and blue are rebuilt from the four
// neighbouring greens with a Laplacian compensation, and shows the green
// interpolator's result feeding the red/blue interpolators; the equation is this
// design's own.
module rb_m3_interpolator
  import cfa_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  logic [DW-1:0] x_ul, x_ur, x_dl, x_dr,
  input  logic [DW-1:0] g_hat,
  input  logic [DW-1:0] g_left, g_right, g_up, g_down,
  output logic [DW-1:0] x_out
);
  localparam int unsigned MAXV = (1 << DW) - 1;
  int total8;

  always_comb begin
    total8 = ((int'(x_ul) + int'(x_ur) + int'(x_dl) + int'(x_dr)) <<< 1)
           + (int'(g_hat) <<< 2)
           - int'(g_left) - int'(g_right) - int'(g_up) - int'(g_down);
    x_out  = DW'(div8_clamp(total8, MAXV));
  end
endmodule
