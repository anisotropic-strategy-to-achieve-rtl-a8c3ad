// cfa_interp_top: edge-adaptive Bayer colour interpolation (demosaicking) processor.
//
// A raw Bayer CFA stream, one sample per clock in raster order, enters at in_pixel;
// full RGB pixels leave at out_r/out_g/out_b in the same order, one per clock. Blocks:
//   line_buffer     two image lines, so three rows can be seen at once
//   register_bank   the 3 x 5 window of CFA samples around the pixel being rebuilt
//   edge_detector   horizontal/vertical activity DH, DV and their sum TD
//   g_interpolator  green at red/blue sites, three models chosen by DH, DV, TD
//   rb_m1/m2/m3     red and blue from horizontal, vertical or diagonal neighbours
//   controller      FSM: pacing, border mirroring and every multiplexer select
// The green output multiplexer passes a green CFA sample through or takes the green
// interpolator; the red/blue multiplexers take the CFA sample itself or one of the
// three models, as the controller selects by the colour of the centre sample.
//
// Interface: in_valid/in_ready handshake on the input (a pixel is taken when both are
// high); in_ready drops for WIDTH+2 clocks after each frame while the last line is
// finished. out_valid marks each output pixel; out_row/out_col give its position.
// Latency: a pixel leaves two clocks after the advance that brings it to the window
// centre, which happens when the pixel one line and two columns later is accepted.
//
// The block set and the data flow (green result fed to the red/blue interpolators,
// output multiplexers driven by the controller) follow the document's block diagram;
// sizes, the Bayer phase, the handshake and border handling are this design's choices.
module cfa_interp_top
  import cfa_pkg::*;
#(
  parameter int unsigned DW     = 8,    // bits per sample
  parameter int unsigned WIDTH  = 640,  // pixels per line (at least 4)
  parameter int unsigned HEIGHT = 480,  // lines per frame (at least 2)
  parameter bit          R_ROW  = 1'b0, // red samples on even rows
  parameter bit          R_COL  = 1'b0  // red samples in even columns
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] in_pixel,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          out_valid,
  output logic [DW-1:0] out_r,
  output logic [DW-1:0] out_g,
  output logic [DW-1:0] out_b,
  output logic [15:0]   out_row,
  output logic [15:0]   out_col,
  output ptype_e        out_ptype,  // colour of the CFA sample at this position
  output gmode_e        out_gmode   // green model used (meaningful at red/blue sites)
);
  // ---- controller --------------------------------------------------------------
  logic        shift_en, win_valid, g_interp;
  logic [15:0] cen_row, cen_col;
  border_t     border;
  ptype_e      ptype;
  rbsel_e      r_sel, b_sel;

  controller #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .R_ROW(R_ROW), .R_COL(R_COL)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .shift_en, .win_valid, .cen_row, .cen_col,
    .border, .ptype, .g_interp, .r_sel, .b_sel
  );

  // ---- line buffer and register bank ---------------------------------------------
  logic [DW-1:0] din, lb_mid, lb_top;
  logic [DW-1:0] win [3][5];

  assign din = in_ready ? in_pixel : '0;   // zeros pushed in while flushing

  line_buffer #(.DW(DW), .WIDTH(WIDTH)) u_lbuf (
    .clk, .rst_n, .shift_en, .din, .mid_out(lb_mid), .top_out(lb_top)
  );

  register_bank #(.DW(DW)) u_rbank (
    .clk, .shift_en, .top_in(lb_top), .mid_in(lb_mid), .bot_in(din), .border, .win
  );

  // ---- edge detector and green interpolator (stage 1 -> 2) -----------------------
  logic [DW+1:0] dh, dv;
  logic [DW+2:0] td;
  logic [DW-1:0] g_hat;
  gmode_e        gmode;

  edge_detector #(.DW(DW)) u_edge (
    .g_left(win[1][1]), .g_right(win[1][3]), .g_up(win[0][2]), .g_down(win[2][2]),
    .d_ul(win[0][1]), .d_ur(win[0][3]), .d_dl(win[2][1]), .d_dr(win[2][3]),
    .dh, .dv, .td
  );

  g_interpolator #(.DW(DW)) u_gint (
    .clk, .rst_n, .dh, .dv, .td,
    .g_left(win[1][1]), .g_right(win[1][3]), .g_up(win[0][2]), .g_down(win[2][2]),
    .c_left2(win[1][0]), .c_center(win[1][2]), .c_right2(win[1][4]),
    .mode_q(gmode), .g_out(g_hat)
  );

  // ---- stage 2: window and controls delayed to meet the green result -------------
  logic [DW-1:0] wd [3][5];
  logic          v_d, gi_d;
  rbsel_e        rs_d, bs_d;
  ptype_e        pt_d;
  logic [15:0]   row_d, col_d;

  always_ff @(posedge clk) wd <= win;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d   <= 1'b0;
      gi_d  <= 1'b0;
      rs_d  <= RS_CENTER;
      bs_d  <= RS_CENTER;
      pt_d  <= PT_R;
      row_d <= '0;
      col_d <= '0;
    end else begin
      v_d   <= win_valid;
      gi_d  <= g_interp;
      rs_d  <= r_sel;
      bs_d  <= b_sel;
      pt_d  <= ptype;
      row_d <= cen_row;
      col_d <= cen_col;
    end
  end

  // ---- red/blue interpolators ------------------------------------------------------
  logic [DW-1:0] x_m1, x_m2, x_m3;

  rb_m1_interpolator #(.DW(DW)) u_m1 (
    .x_left(wd[1][1]), .x_right(wd[1][3]),
    .g_center(wd[1][2]), .g_left2(wd[1][0]), .g_right2(wd[1][4]), .x_out(x_m1)
  );

  rb_m2_interpolator #(.DW(DW)) u_m2 (
    .x_up(wd[0][2]), .x_down(wd[2][2]), .g_center(wd[1][2]),
    .g_ul(wd[0][1]), .g_ur(wd[0][3]), .g_dl(wd[2][1]), .g_dr(wd[2][3]), .x_out(x_m2)
  );

  rb_m3_interpolator #(.DW(DW)) u_m3 (
    .x_ul(wd[0][1]), .x_ur(wd[0][3]), .x_dl(wd[2][1]), .x_dr(wd[2][3]), .g_hat,
    .g_left(wd[1][1]), .g_right(wd[1][3]), .g_up(wd[0][2]), .g_down(wd[2][2]),
    .x_out(x_m3)
  );

  // ---- output multiplexers and registers -----------------------------------------
  function automatic logic [DW-1:0] pick(input rbsel_e sel, input logic [DW-1:0] c,
                                         input logic [DW-1:0] m1, input logic [DW-1:0] m2,
                                         input logic [DW-1:0] m3);
    unique case (sel)
      RS_M1:   return m1;
      RS_M2:   return m2;
      RS_M3:   return m3;
      default: return c;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_r     <= '0;
      out_g     <= '0;
      out_b     <= '0;
      out_row   <= '0;
      out_col   <= '0;
      out_ptype <= PT_R;
      out_gmode <= GM_NONE;
    end else begin
      out_valid <= v_d;
      out_g     <= gi_d ? g_hat : wd[1][2];
      out_r     <= pick(rs_d, wd[1][2], x_m1, x_m2, x_m3);
      out_b     <= pick(bs_d, wd[1][2], x_m1, x_m2, x_m3);
      out_row   <= row_d;
      out_col   <= col_d;
      out_ptype <= pt_d;
      out_gmode <= gmode;
    end
  end
endmodule
