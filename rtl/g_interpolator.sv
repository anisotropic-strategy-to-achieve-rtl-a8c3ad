// g_interpolator: reconfigurable green interpolator for red and blue CFA sites.
//
// Three green interpolation models share one datapath; the edge measures choose
// between them:
//   horizontal (4*DH < TD): G = 1/2 (Gl + Gr)                  + 1/4 L
//   vertical   (4*DV < TD): G = 3/8 (Gu + Gd) + 1/8 (Gl + Gr)  + 1/8 L
//   no edge    (otherwise): G = 1/4 (Gl + Gr + Gu + Gd)          + 1/8 L
// with L = 2*C - Cl - Cr, the horizontal Laplacian of the centre sample C and its
// same-colour neighbours two columns away. Adding L is the spatial sharpening
// compensation that counters the blur of plain averaging. The window has only three
// rows, so every model takes its compensation from the row; the vertical model
// keeps a small share of the horizontal pair.
//
// Timing: stage 1 adds the pairs and forms L, registering the three partial results
// and the chosen model; stage 2 (combinational) scales and adds them by shifts,
// rounds, and clamps to the pixel range. g_out is valid one clock after the inputs.
//
// From the document: the three models (none, horizontal, vertical enhancement), the
// selection by TD, DH and DV, the sharpening-filter compensation, the weights 1/2,
// 1/4, 1/8 and 3/8, shifts in place of multipliers and dividers, and three pipeline
// registers. The exact equations and the selection thresholds are this design's own.
module g_interpolator
  import cfa_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW+1:0] dh,
  input  logic [DW+1:0] dv,
  input  logic [DW+2:0] td,
  input  logic [DW-1:0] g_left, g_right, g_up, g_down,
  input  logic [DW-1:0] c_left2, c_center, c_right2,
  output gmode_e        mode_q,   // model used for g_out
  output logic [DW-1:0] g_out
);
  localparam int unsigned MAXV = (1 << DW) - 1;

  gmode_e               mode_d;
  logic signed [DW+2:0] sh_q, sv_q, lap_q;   // the three pipeline registers
  logic signed [DW+2:0] sh_d, sv_d, lap_d;
  int                   total8;

  // Model choice, comparisons against TD scaled by shifts.
  always_comb begin
    if      (((DW+5)'(dh) << 2) < (DW+5)'(td)) mode_d = GM_HORZ;
    else if (((DW+5)'(dv) << 2) < (DW+5)'(td)) mode_d = GM_VERT;
    else                                       mode_d = GM_NONE;
    sh_d  = $signed((DW+3)'(g_left)) + $signed((DW+3)'(g_right));
    sv_d  = $signed((DW+3)'(g_up))   + $signed((DW+3)'(g_down));
    lap_d = ($signed((DW+3)'(c_center)) <<< 1)
            - ($signed((DW+3)'(c_left2)) + $signed((DW+3)'(c_right2)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= GM_NONE;
      sh_q   <= '0;
      sv_q   <= '0;
      lap_q  <= '0;
    end else begin
      mode_q <= mode_d;
      sh_q   <= sh_d;
      sv_q   <= sv_d;
      lap_q  <= lap_d;
    end
  end

  // Stage 2: the operand multiplexers pick shifted partial sums per model.
  always_comb begin
    unique case (mode_q)
      GM_HORZ: total8 = (int'(sh_q) <<< 2) + (int'(lap_q) <<< 1);
      GM_VERT: total8 = (int'(sv_q) <<< 1) + int'(sv_q) + int'(sh_q) + int'(lap_q);
      default: total8 = (int'(sh_q) <<< 1) + (int'(sv_q) <<< 1) + int'(lap_q);
    endcase
    g_out = DW'(div8_clamp(total8, MAXV));
  end
endmodule
