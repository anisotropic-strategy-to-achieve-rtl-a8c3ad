// tb_cfa_interp_top: end-to-end test of the colour interpolation processor.
//
// Streams four small frames through the processor and compares every output pixel
// (R, G, B, position, colour kind and green model) with the reference model. The
// frames are chosen to exercise every mechanism: random texture, vertical and
// horizontal stripes (vertical / horizontal green models), and a full-range
// checkerboard (results clamped to the pixel range). Random input stalls are
// inserted except in frame 2, which is used to check the pixel-in/pixel-out rate:
// the last pixel must leave exactly W*H + W + 4 clocks after the first is accepted,
// and the first W + 5 clocks after it. Each mechanism's occurrences are counted and
// a mechanism that never happened counts as a failure.
module tb_cfa_interp_top;
  import cfa_pkg::*;
  import cfa_ref_pkg::*;

  localparam int W  = 12;
  localparam int H  = 8;
  localparam int DW = 8;
  localparam int NF = 4;
  localparam int MAXV = (1 << DW) - 1;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [DW-1:0] in_pixel = '0;
  logic          in_valid = 1'b0;
  logic          in_ready, out_valid;
  logic [DW-1:0] out_r, out_g, out_b;
  logic [15:0]   out_row, out_col;
  ptype_e        out_ptype;
  gmode_e        out_gmode;

  cfa_interp_top #(.DW(DW), .WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [NF][];
  int cyc = 0;
  int n_out = 0;
  int n_stall = 0, n_flush = 0, n_border = 0, n_clamp = 0;
  int n_mode [3] = '{0, 0, 0};
  int n_m1 = 0, n_m2 = 0, n_m3 = 0;
  int t_first_in = -1, t_first_out = -1, t_last_out = -1;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Frame contents.
  initial begin
    for (int f = 0; f < NF; f++) begin
      img[f] = new[W*H];
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          int v;
          case (f)
            0: v = $urandom_range(MAXV);
            1: v = (c % 4 < 2 ? 40 : 200) + $urandom_range(3);           // vertical stripes
            2: v = (r % 2 == 0 ? 30 : 220) + $urandom_range(3);          // horizontal stripes
            default: v = (((r / 2) + (c / 2)) % 2 == 0) ? 0 : MAXV;      // checkerboard
          endcase
          img[f][r*W + c] = v;
        end
    end
  end

  // Driver: raster order, random stalls except in frame 2.
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < W*H; i++) begin
        @(negedge clk);
        while (f != 2 && $urandom_range(4) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_pixel = DW'(img[f][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (f == 2 && i == 0) t_first_in = cyc;
      end
      @(negedge clk) in_valid = 1'b0;
    end
  end

  // Stall and flush counters.
  always @(posedge clk) if (rst_n) begin
    if (!in_valid && in_ready) n_stall++;
    if (!in_ready) n_flush++;
  end

  // Monitor: compare every output pixel with the reference.
  always @(posedge clk) if (rst_n && out_valid) begin
    int f, idx, r, c, k, er, eg, eb, em;
    f   = n_out / (W*H);
    idx = n_out % (W*H);
    r   = idx / W;
    c   = idx % W;
    k   = kind_at(r, c, 0, 0);
    if (f < NF) begin
      expect_rgb(img[f], W, H, r, c, k, MAXV, er, eg, eb, em, n_clamp);
      check(out_row == 16'(r) && out_col == 16'(c),
            $sformatf("frame %0d pixel %0d at (%0d,%0d) expected (%0d,%0d)", f, idx, out_row, out_col, r, c));
      check(int'(out_ptype) == k, $sformatf("kind at (%0d,%0d)", r, c));
      check(int'(out_r) == er && int'(out_g) == eg && int'(out_b) == eb,
            $sformatf("f%0d (%0d,%0d) kind %0d got %0d/%0d/%0d expected %0d/%0d/%0d",
                      f, r, c, k, out_r, out_g, out_b, er, eg, eb));
      if (k == 0 || k == 3) begin
        check(int'(out_gmode) == em, $sformatf("green model at (%0d,%0d): %0d vs %0d", r, c, out_gmode, em));
        n_mode[em]++;
        n_m3++;
      end else begin
        n_m1++;
        n_m2++;
      end
      if (r == 0 || r == H-1 || c <= 1 || c >= W-2) n_border++;
      if (f == 2 && idx == 0)     t_first_out = cyc;
      if (f == 2 && idx == W*H-1) t_last_out  = cyc;
    end
    n_out++;
  end

  // End of test.
  initial begin
    wait (n_out == NF*W*H);
    repeat (5) @(posedge clk);
    check(t_last_out - t_first_in == W*H + W + 4,
          $sformatf("frame time %0d, expected %0d", t_last_out - t_first_in, W*H + W + 4));
    check(t_first_out - t_first_in == W + 5,
          $sformatf("first-pixel latency %0d, expected %0d", t_first_out - t_first_in, W + 5));
    $display("mechanisms: horz=%0d vert=%0d none=%0d m1=%0d m2=%0d m3=%0d stall=%0d flush=%0d border=%0d clamp=%0d frames=%0d",
             n_mode[1], n_mode[2], n_mode[0], n_m1, n_m2, n_m3, n_stall, n_flush, n_border, n_clamp, n_out / (W*H));
    check(n_mode[1] > 0, "horizontal green model never used");
    check(n_mode[2] > 0, "vertical green model never used");
    check(n_mode[0] > 0, "no-edge green model never used");
    check(n_m1 > 0 && n_m2 > 0 && n_m3 > 0, "a red/blue model never used");
    check(n_stall > 0, "no input stall");
    check(n_flush > 0, "no flush");
    check(n_border > 0, "no border pixel");
    check(n_clamp > 0, "no clamped result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d pixels", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
