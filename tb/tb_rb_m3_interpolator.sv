// tb_rb_m3_interpolator: random and extreme inputs, compared with
// X = 1/4 (four diagonal X) + 1/8 (4 G^ - four neighbouring greens), rounded and clamped.
module tb_rb_m3_interpolator;
  import cfa_ref_pkg::rnd8;
  localparam int DW = 8;
  logic          clk = 1'b0;
  logic [DW-1:0] x_ul, x_ur, x_dl, x_dr, g_hat, g_left, g_right, g_up, g_down, x_out;
  int            checks = 0, failures = 0;

  rb_m3_interpolator #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int e;
      @(negedge clk);
      {x_ul, x_ur, x_dl, x_dr} = $urandom;
      {g_left, g_right, g_up, g_down} = $urandom;
      g_hat = DW'($urandom);
      if (n % 9 == 0) begin g_hat = 8'hFF; {g_left, g_right, g_up, g_down} = '0; end
      if (n % 13 == 0) begin g_hat = 8'h00; {g_left, g_right, g_up, g_down} = '1; end
      #1;
      e = rnd8(2*(int'(x_ul) + int'(x_ur) + int'(x_dl) + int'(x_dr)) + 4*int'(g_hat)
               - int'(g_left) - int'(g_right) - int'(g_up) - int'(g_down), 255);
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
