// rb_m1_interpolator: red/blue interpolation, model 1.
//
// Used at a green CFA site for the chroma colour whose samples lie left and right
// of it in the same row:
//   X = 1/2 (X_left + X_right) + 1/4 (2*G - G_left2 - G_right2)
// where G is the centre green and G_left2, G_right2 are the greens two columns
// away. The second term is a Laplacian compensation taken from the green plane.
// Purely combinational; the result is rounded and clamped to the pixel range.
//
// The document names three red/blue models, states that their compensation is a
// Laplacian filter and that the weights are 1/2, 1/4, 1/8 and 3/8; the assignment
// of this model to the horizontal case and its equation are this design's own.
module rb_m1_interpolator
  import cfa_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  logic [DW-1:0] x_left, x_right,
  input  logic [DW-1:0] g_center, g_left2, g_right2,
  output logic [DW-1:0] x_out
);
  localparam int unsigned MAXV = (1 << DW) - 1;
  int total8;

  always_comb begin
    total8 = ((int'(x_left) + int'(x_right)) <<< 2)
           + (((int'(g_center) <<< 1) - int'(g_left2) - int'(g_right2)) <<< 1);
    x_out  = DW'(div8_clamp(total8, MAXV));
  end
endmodule
