// tb_cfa_interp_full: one complete frame through the processor at its default size
// (640 x 480, 8-bit samples). The frame is split into four quadrants of random
// texture, vertical stripes, horizontal stripes and a full-range checkerboard; every
// output pixel is compared with the reference model, and the frame must finish
// exactly W*H + W + 4 clocks after its first pixel is accepted (no input gaps).
module tb_cfa_interp_full;
  import cfa_pkg::*;
  import cfa_ref_pkg::*;

  localparam int W  = 640;
  localparam int H  = 480;
  localparam int DW = 8;
  localparam int MAXV = 255;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [DW-1:0] in_pixel = '0;
  logic          in_valid = 1'b0;
  logic          in_ready, out_valid;
  logic [DW-1:0] out_r, out_g, out_b;
  logic [15:0]   out_row, out_col;
  ptype_e        out_ptype;
  gmode_e        out_gmode;

  cfa_interp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [];
  int cyc = 0, n_out = 0, n_clamp = 0;
  int n_mode [3] = '{0, 0, 0};
  int t_first_in = -1, t_last_out = -1;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    img = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        if (r < H/2 && c < W/2)  v = $urandom_range(MAXV);
        else if (r < H/2)        v = (c % 4 < 2 ? 40 : 200) + $urandom_range(3);
        else if (c < W/2)        v = (r % 2 == 0 ? 30 : 220) + $urandom_range(3);
        else                     v = (((r / 2) + (c / 2)) % 2 == 0) ? 0 : MAXV;
        img[r*W + c] = v;
      end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_pixel = DW'(img[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (i == 0) t_first_in = cyc;
    end
    @(negedge clk) in_valid = 1'b0;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int r, c, k, er, eg, eb, em;
    r = n_out / W;
    c = n_out % W;
    k = kind_at(r, c, 0, 0);
    expect_rgb(img, W, H, r, c, k, MAXV, er, eg, eb, em, n_clamp);
    check(out_row == 16'(r) && out_col == 16'(c) && int'(out_ptype) == k,
          $sformatf("position (%0d,%0d) expected (%0d,%0d)", out_row, out_col, r, c));
    check(int'(out_r) == er && int'(out_g) == eg && int'(out_b) == eb,
          $sformatf("(%0d,%0d) got %0d/%0d/%0d expected %0d/%0d/%0d",
                    r, c, out_r, out_g, out_b, er, eg, eb));
    if (k == 0 || k == 3) begin
      check(int'(out_gmode) == em, $sformatf("green model at (%0d,%0d)", r, c));
      n_mode[em]++;
    end
    n_out++;
    if (n_out == W*H) t_last_out = cyc;
  end

  initial begin
    wait (n_out == W*H);
    repeat (3) @(posedge clk);
    check(t_last_out - t_first_in == W*H + W + 4,
          $sformatf("frame time %0d, expected %0d", t_last_out - t_first_in, W*H + W + 4));
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0 && n_clamp > 0,
          "a green model or clamping never occurred");
    $display("pixels=%0d horz=%0d vert=%0d none=%0d clamp=%0d",
             n_out, n_mode[1], n_mode[2], n_mode[0], n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (W*H + 4*W + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d pixels", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
