// register_bank: the 3 x 5 window of CFA samples (15 pixels) read by the edge
// detector, the green interpolator and the three red/blue interpolators every cycle.
//
// Three rows of five registers shift left by one column on each advance; the new
// right-hand column is {top_in, mid_in, bot_in}: rows r-1 and r from the line buffer
// and row r+1 straight from the pixel input. The window output is the register
// contents with samples outside the image replaced by their mirror image about the
// centre pixel (column c-k by c+k, row r-1 by r+1 and the reverse). Mirroring about
// the centre keeps each replaced sample the same colour as the missing one. The
// border flags come from the controller and describe the pixel now at the centre.
//
// The document gives the 15-pixel size and its purpose (every interpolator served in
// every cycle, one pixel in and one out); the 3-row by 5-column shape follows its
// statement that the window sees further horizontally than vertically without more
// line memory. The border mirroring is this design's choice.
module register_bank
  import cfa_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          shift_en,
  input  logic [DW-1:0] top_in,          // row r-1 (line buffer, line 2)
  input  logic [DW-1:0] mid_in,          // row r   (line buffer, line 1)
  input  logic [DW-1:0] bot_in,          // row r+1 (pixel input)
  input  border_t       border,          // position of the current centre pixel
  output logic [DW-1:0] win [3][5]       // [row 0..2][column 0..4], centre at [1][2]
);
  logic [DW-1:0] regs [3][5];
  logic [1:0]    rsel [3];   // source row of each output row
  logic [2:0]    csel [5];   // source column of each output column

  always_ff @(posedge clk) begin
    if (shift_en) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 4; c++)
          regs[r][c] <= regs[r][c+1];
      regs[0][4] <= top_in;
      regs[1][4] <= mid_in;
      regs[2][4] <= bot_in;
    end
  end

  always_comb begin
    rsel[0] = border.top    ? 2'd2 : 2'd0;
    rsel[1] = 2'd1;
    rsel[2] = border.bottom ? 2'd0 : 2'd2;
    csel[0] = border.left2  ? 3'd4 : 3'd0;
    csel[1] = border.left1  ? 3'd3 : 3'd1;
    csel[2] = 3'd2;
    csel[3] = border.right1 ? 3'd1 : 3'd3;
    csel[4] = border.right2 ? 3'd0 : 3'd4;
    // With an image at least four columns wide a column is never off the image on
    // both sides at once, so the mirrored column always holds a real sample.
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 5; c++)
        win[r][c] = regs[rsel[r]][csel[c]];
  end
endmodule
