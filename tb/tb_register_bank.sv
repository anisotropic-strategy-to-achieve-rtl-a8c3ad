// tb_register_bank: shifts random columns into the 3 x 5 window with random border
// flags and compares all 15 outputs with a model of the window and of the mirroring
// of off-image samples about the centre.
module tb_register_bank;
  import cfa_pkg::*;
  localparam int DW = 8;

  logic          clk = 1'b0, shift_en = 1'b0;
  logic [DW-1:0] top_in = '0, mid_in = '0, bot_in = '0;
  border_t       border = '0;
  logic [DW-1:0] win [3][5];
  int            checks = 0, failures = 0, nshift = 0;
  int            model [3][5];

  register_bank #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      shift_en = ($urandom_range(3) != 0);
      top_in = DW'($urandom);
      mid_in = DW'($urandom);
      bot_in = DW'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 4; c++) model[r][c] = model[r][c+1];
        model[0][4] = int'(top_in);
        model[1][4] = int'(mid_in);
        model[2][4] = int'(bot_in);
        nshift++;
      end
      @(negedge clk);
      shift_en = 1'b0;
      // Legal border combinations for an image at least four columns wide.
      border.top    = $urandom_range(1);
      border.bottom = border.top ? 1'b0 : 1'($urandom_range(1));
      case ($urandom_range(4))
        0: {border.left1, border.left2, border.right1, border.right2} = 4'b1100;
        1: {border.left1, border.left2, border.right1, border.right2} = 4'b0100;
        2: {border.left1, border.left2, border.right1, border.right2} = 4'b0011;
        3: {border.left1, border.left2, border.right1, border.right2} = 4'b0001;
        default: {border.left1, border.left2, border.right1, border.right2} = 4'b0000;
      endcase
      #1;
      if (nshift >= 5) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 5; c++) begin
            int sr, sc;
            sr = r;
            sc = c;
            if ((r == 0 && border.top) || (r == 2 && border.bottom)) sr = 2 - r;
            if ((c == 0 && border.left2) || (c == 1 && border.left1) ||
                (c == 3 && border.right1) || (c == 4 && border.right2)) sc = 4 - c;
            checks++;
            if (int'(win[r][c]) != model[sr][sc]) begin
              failures++;
              $display("FAIL: win[%0d][%0d]=%0d expected %0d", r, c, win[r][c], model[sr][sc]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
