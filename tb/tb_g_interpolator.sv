// tb_g_interpolator: drives random neighbourhoods and edge measures every clock and
// checks, one clock later (the block's latency), the chosen model and the green
// value against the three model equations, including clamped results.
module tb_g_interpolator;
  import cfa_pkg::*;
  import cfa_ref_pkg::rnd8;
  localparam int DW = 8;
  localparam int MAXV = 255;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [DW+1:0] dh = '0, dv = '0;
  logic [DW+2:0] td = '0;
  logic [DW-1:0] g_left = '0, g_right = '0, g_up = '0, g_down = '0;
  logic [DW-1:0] c_left2 = '0, c_center = '0, c_right2 = '0;
  gmode_e        mode_q;
  logic [DW-1:0] g_out;
  int            checks = 0, failures = 0;
  int            n_mode [3] = '{0, 0, 0};

  g_interpolator #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int em, eg, gl, gr, gu, gd, lap, t8;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      dh = (DW+2)'($urandom_range(765));
      dv = (DW+2)'($urandom_range(765));
      if (n % 5 == 0) dv = dh;
      td = (DW+3)'(dh) + (DW+3)'(dv);
      {g_left, g_right, g_up, g_down} = $urandom;
      {c_left2, c_center, c_right2}   = 24'($urandom);
      if (n % 7 == 0) begin c_center = 8'hFF; c_left2 = 8'h00; c_right2 = 8'h00; end
      if (n % 11 == 0) begin c_center = 8'h00; c_left2 = 8'hFF; c_right2 = 8'hFF; end
      gl = g_left; gr = g_right; gu = g_up; gd = g_down;
      lap = 2*int'(c_center) - int'(c_left2) - int'(c_right2);
      if (4*int'(dh) < int'(td))      begin em = 1; t8 = 4*(gl+gr) + 2*lap; end
      else if (4*int'(dv) < int'(td)) begin em = 2; t8 = 3*(gu+gd) + (gl+gr) + lap; end
      else                            begin em = 0; t8 = 2*(gl+gr+gu+gd) + lap; end
      eg = rnd8(t8, MAXV);
      @(negedge clk);
      checks++;
      if (int'(mode_q) != em || int'(g_out) != eg) begin
        failures++;
        if (failures < 10) $display("FAIL: mode %0d/%0d g %0d/%0d", mode_q, em, g_out, eg);
      end
      n_mode[em]++;
    end
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) begin
      failures++;
      $display("FAIL: a model was never chosen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
