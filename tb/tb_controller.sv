// tb_controller: runs three small frames with random input gaps and compares the
// controller against a counting model: in_ready must drop for exactly WIDTH+2
// advances after each frame's last pixel, and each valid window must carry the next
// centre position in raster order with the right border flags, colour kind and
// multiplexer selects. Two frames without gaps check the frame period of
// WIDTH*HEIGHT + WIDTH + 2 clocks.
module tb_controller;
  import cfa_pkg::*;
  localparam int W = 5;
  localparam int H = 3;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic        in_ready, shift_en, win_valid, g_interp;
  logic [15:0] cen_row, cen_col;
  border_t     border;
  ptype_e      ptype;
  rbsel_e      r_sel, b_sel;
  int          checks = 0, failures = 0;
  int          s = 0, frames = 0, flush_cycles = 0, cyc = 0;
  int          t_frame [$];
  bit          gaps = 1'b1;

  controller #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    forever begin
      in_valid = gaps ? ($urandom_range(2) != 0) : 1'b1;
      #1;
      check(in_ready == (s < W*H), $sformatf("in_ready %0d at advance %0d", in_ready, s));
      check(shift_en == (in_valid || !in_ready), "shift_en");
      if (!in_ready) flush_cycles++;
      @(posedge clk);
      cyc++;
      if (shift_en) begin
        bit exp_valid;
        int idx, r, c;
        s++;
        exp_valid = (s >= W + 3);
        idx = s - W - 3;
        r = idx / W;
        c = idx % W;
        if (s == W*H + W + 2) begin
          s = 0;
          frames++;
          t_frame.push_back(cyc);
        end
        @(negedge clk);
        check(win_valid == exp_valid, $sformatf("win_valid %0d expected %0d", win_valid, exp_valid));
        if (exp_valid) begin
          ptype_e k;
          bit rr, cc;
          rr = (r % 2 == 0);
          cc = (c % 2 == 0);
          k = (rr && cc) ? PT_R : (!rr && !cc) ? PT_B : rr ? PT_GR : PT_GB;
          check(int'(cen_row) == r && int'(cen_col) == c,
                $sformatf("centre (%0d,%0d) expected (%0d,%0d)", cen_row, cen_col, r, c));
          check(border.top == (r == 0) && border.bottom == (r == H-1) &&
                border.left1 == (c == 0) && border.left2 == (c <= 1) &&
                border.right1 == (c == W-1) && border.right2 == (c >= W-2), "border flags");
          check(ptype == k, $sformatf("kind %0d expected %0d", ptype, k));
          case (k)
            PT_R:    check(g_interp && r_sel == RS_CENTER && b_sel == RS_M3, "selects at red");
            PT_B:    check(g_interp && r_sel == RS_M3 && b_sel == RS_CENTER, "selects at blue");
            PT_GR:   check(!g_interp && r_sel == RS_M1 && b_sel == RS_M2, "selects at green/red row");
            default: check(!g_interp && r_sel == RS_M2 && b_sel == RS_M1, "selects at green/blue row");
          endcase
        end
        #1;
      end else begin
        @(negedge clk);
        check(!win_valid, "win_valid without an advance");
        #1;
      end
      if (frames == 3) gaps = 1'b0;
      if (frames == 5) break;
    end
    check(flush_cycles == 5 * (W + 2), $sformatf("flush cycles %0d", flush_cycles));
    check(t_frame[4] - t_frame[3] == W*H + W + 2,
          $sformatf("frame period %0d expected %0d", t_frame[4] - t_frame[3], W*H + W + 2));
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
