// tb_rb_m2_interpolator: random and extreme inputs, compared with
// X = 1/2 (Xu + Xd) + 1/8 (4G - four diagonal greens), rounded and clamped.
module tb_rb_m2_interpolator;
  import cfa_ref_pkg::rnd8;
  localparam int DW = 8;
  logic          clk = 1'b0;
  logic [DW-1:0] x_up, x_down, g_center, g_ul, g_ur, g_dl, g_dr, x_out;
  int            checks = 0, failures = 0;

  rb_m2_interpolator #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int e;
      @(negedge clk);
      {x_up, x_down, g_center, g_ul} = $urandom;
      {g_ur, g_dl, g_dr} = 24'($urandom);
      if (n % 9 == 0) begin g_center = 8'hFF; {g_ul, g_ur, g_dl, g_dr} = '0; end
      if (n % 13 == 0) begin g_center = 8'h00; {g_ul, g_ur, g_dl, g_dr} = '1; end
      #1;
      e = rnd8(4*(int'(x_up) + int'(x_down)) + 4*int'(g_center)
               - int'(g_ul) - int'(g_ur) - int'(g_dl) - int'(g_dr), 255);
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
