// controller: finite state machine that sequences the processor, one pixel in and
// one pixel out per clock.
//
// States:
//   FILL  - pixels are accepted but the window centre has not yet reached the first
//           image pixel (it trails the newest pixel by one line and two columns).
//   RUN   - every accepted pixel moves the centre by one pixel; one result per pixel.
//   FLUSH - the frame's input is complete; in_ready is low and the pipeline advances
//           on its own for WIDTH+2 clocks to finish the last line, then FILL again.
// A frame is WIDTH*HEIGHT pixels in raster order, accepted when in_valid and in_ready
// are both high; the first pixel after reset, and after each FLUSH, starts a frame.
//
// For the window that the register bank holds after each advance the controller
// registers its centre position, its border flags (for mirroring), the colour of
// the centre sample and the output multiplexer selects: whether green is passed
// through or interpolated, and which red/blue model (or the sample itself) supplies
// red and blue. win_valid is high for one clock for each new valid window.
//
// The document says the controller is an FSM that drives the multiplexers that pick
// the interpolators' inputs and outputs, sends the reconfiguration controls and paces
// memory access to keep pixel-in/pixel-out; the states, the flush and the Bayer
// phase parameters are this design's own choices.
module controller
  import cfa_pkg::*;
#(
  parameter int unsigned WIDTH  = 640,  // pixels per line, at least 4
  parameter int unsigned HEIGHT = 480,  // lines per frame, at least 2
  parameter bit          R_ROW  = 1'b0, // row parity of the red samples
  parameter bit          R_COL  = 1'b0  // column parity of the red samples
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  output logic        shift_en,      // advance line buffer and register bank
  output logic        win_valid,     // register bank holds a new valid window
  output logic [15:0] cen_row,
  output logic [15:0] cen_col,
  output border_t     border,
  output ptype_e      ptype,
  output logic        g_interp,      // 1: green from the interpolator
  output rbsel_e      r_sel,
  output rbsel_e      b_sel
);
  typedef enum logic [1:0] {S_FILL = 2'd0, S_RUN = 2'd1, S_FLUSH = 2'd2} state_e;

  localparam int unsigned NPIX   = WIDTH * HEIGHT;
  localparam int unsigned NSHIFT = NPIX + WIDTH + 2;  // advances per frame
  localparam int unsigned LEAD   = WIDTH + 3;         // advances until centre (0,0)

  state_e      state;
  logic [31:0] s;          // advances done in this frame
  logic [15:0] nr, nc;     // centre position after this advance

  assign in_ready = (state != S_FLUSH);
  assign shift_en = (state == S_FLUSH) || in_valid;

  always_comb begin
    if (state == S_FILL) begin
      nr = '0;
      nc = '0;
    end else if (cen_col == 16'(WIDTH - 1)) begin
      nr = cen_row + 1'b1;
      nc = '0;
    end else begin
      nr = cen_row;
      nc = cen_col + 1'b1;
    end
  end

  function automatic ptype_e type_at(input logic r0, input logic c0);
    logic rr, cc;
    rr = (r0 == R_ROW);
    cc = (c0 == R_COL);
    if (rr && cc)  return PT_R;
    if (!rr && !cc) return PT_B;
    if (rr)        return PT_GR;
    return PT_GB;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_FILL;
      s         <= '0;
      win_valid <= 1'b0;
      cen_row   <= '0;
      cen_col   <= '0;
      border    <= '0;
      ptype     <= PT_R;
      g_interp  <= 1'b0;
      r_sel     <= RS_CENTER;
      b_sel     <= RS_CENTER;
    end else begin
      win_valid <= 1'b0;
      if (shift_en) begin
        s <= s + 1;
        unique case (state)
          S_FILL:  if (s + 1 == LEAD)  state <= S_RUN;
          S_RUN:   if (s + 1 == NPIX)  state <= S_FLUSH;
          default: ;
        endcase
        if (state == S_FLUSH && s + 1 == NSHIFT) begin
          state <= S_FILL;
          s     <= '0;
        end
        if (state != S_FILL || s + 1 == LEAD) begin
          win_valid     <= 1'b1;
          cen_row       <= nr;
          cen_col       <= nc;
          border.top    <= (nr == 0);
          border.bottom <= (nr == 16'(HEIGHT - 1));
          border.left1  <= (nc == 0);
          border.left2  <= (nc <= 1);
          border.right1 <= (nc == 16'(WIDTH - 1));
          border.right2 <= (nc >= 16'(WIDTH - 2));
          ptype         <= type_at(nr[0], nc[0]);
          unique case (type_at(nr[0], nc[0]))
            PT_R:  begin g_interp <= 1'b1; r_sel <= RS_CENTER; b_sel <= RS_M3;     end
            PT_B:  begin g_interp <= 1'b1; r_sel <= RS_M3;     b_sel <= RS_CENTER; end
            PT_GR: begin g_interp <= 1'b0; r_sel <= RS_M1;     b_sel <= RS_M2;     end
            default: begin g_interp <= 1'b0; r_sel <= RS_M2;   b_sel <= RS_M1;     end
          endcase
        end
      end
    end
  end

  // The input is never accepted while the pipeline flushes.
  a_no_accept_in_flush: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_FLUSH) |-> !in_ready);
  // The centre never runs past the last pixel of the frame.
  a_centre_in_frame: assert property (@(posedge clk) disable iff (!rst_n)
    win_valid |-> (cen_row < 16'(HEIGHT) && cen_col < 16'(WIDTH)));
endmodule
