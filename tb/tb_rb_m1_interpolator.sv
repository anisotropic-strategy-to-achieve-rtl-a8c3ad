// tb_rb_m1_interpolator: random and extreme inputs, compared with
// X = 1/2 (Xl + Xr) + 1/4 (2G - Gl2 - Gr2), rounded and clamped.
module tb_rb_m1_interpolator;
  import cfa_ref_pkg::rnd8;
  localparam int DW = 8;
  logic          clk = 1'b0;
  logic [DW-1:0] x_left, x_right, g_center, g_left2, g_right2, x_out;
  int            checks = 0, failures = 0;

  rb_m1_interpolator #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int e;
      @(negedge clk);
      {x_left, x_right, g_center, g_left2} = $urandom;
      g_right2 = DW'($urandom);
      if (n % 9 == 0) begin g_center = 8'hFF; g_left2 = 8'h00; g_right2 = 8'h00; end
      if (n % 13 == 0) begin g_center = 8'h00; g_left2 = 8'hFF; g_right2 = 8'hFF; end
      #1;
      e = rnd8(4*(int'(x_left) + int'(x_right))
               + 2*(2*int'(g_center) - int'(g_left2) - int'(g_right2)), 255);
      checks++;
      if (int'(x_out) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d expected %0d", x_out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
