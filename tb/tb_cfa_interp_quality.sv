// tb_cfa_interp_quality: image-quality run on a synthetic colour scene.
//
// A 96 x 64 full-colour test scene (smooth colour ramps, a sharp-edged disc, and thin
// stripes in both directions, with strongly correlated channels as in natural images)
// is reduced to an RGGB mosaic and streamed through the processor. The testbench
// measures the CPSNR, 10*log10(255^2 / mean squared error over R, G and B), over the
// interior (a 2-pixel margin excluded). It computes the same measure for plain
// bilinear interpolation of the mosaic. It checks that the processor beats bilinear
// interpolation and reaches at least 25 dB. It also checks every output against the
// reference model.
module tb_cfa_interp_quality;
  import cfa_pkg::*;
  import cfa_ref_pkg::*;

  localparam int W  = 96;
  localparam int H  = 64;
  localparam int DW = 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [DW-1:0] in_pixel = '0;
  logic          in_valid = 1'b0;
  logic          in_ready, out_valid;
  logic [DW-1:0] out_r, out_g, out_b;
  logic [15:0]   out_row, out_col;
  ptype_e        out_ptype;
  gmode_e        out_gmode;

  cfa_interp_top #(.DW(DW), .WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  int    checks = 0, failures = 0, n_out = 0, n_clamp = 0;
  int    tr [W*H], tg [W*H], tb [W*H];   // true colour scene
  int    mos [];                         // CFA mosaic
  real   se_dut = 0.0, se_bil = 0.0;
  int    n_se = 0;

  function automatic int clip(input real v);
    if (v < 0.0) return 0;
    if (v > 255.0) return 255;
    return int'(v);
  endfunction

  // Bilinear value of channel ch (0 R, 1 G, 2 B) at (r, c) from the mosaic.
  function automatic int bilin(input int r, input int c, input int ch);
    int k, s, n;
    k = kind_at(r, c, 0, 0);
    s = 0; n = 0;
    if (ch == 1) begin
      if (k == 1 || k == 2) return mos[r*W + c];
      s = px(mos,W,H,r,c,0,-1) + px(mos,W,H,r,c,0,1) + px(mos,W,H,r,c,-1,0) + px(mos,W,H,r,c,1,0);
      return (s + 2) / 4;
    end
    if ((ch == 0 && k == 0) || (ch == 2 && k == 3)) return mos[r*W + c];
    if (k == 0 || k == 3)
      return (px(mos,W,H,r,c,-1,-1) + px(mos,W,H,r,c,-1,1) + px(mos,W,H,r,c,1,-1)
              + px(mos,W,H,r,c,1,1) + 2) / 4;
    // green site: horizontal pair if that colour is on this row
    if ((ch == 0) == (k == 1))
      return (px(mos,W,H,r,c,0,-1) + px(mos,W,H,r,c,0,1) + 1) / 2;
    return (px(mos,W,H,r,c,-1,0) + px(mos,W,H,r,c,1,0) + 1) / 2;
  endfunction

  initial begin
    mos = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        real base, dr, db, d2;
        base = 60.0 + 1.2 * c + 0.8 * r;
        dr   = 20.0 + 0.3 * r;
        db   = -15.0 + 0.2 * c;
        d2   = (c - 30.0) * (c - 30.0) + (r - 32.0) * (r - 32.0);
        if (d2 < 400.0) begin base = base + 70.0; dr = dr - 40.0; end   // disc
        if (c >= 64 && c < 80) base = base + ((c / 3) % 2 == 0 ? 50.0 : -30.0); // vertical stripes
        if (c >= 80 && (r / 3) % 2 == 0) base = base - 45.0;            // horizontal stripes
        tg[r*W + c] = clip(base);
        tr[r*W + c] = clip(base + dr);
        tb[r*W + c] = clip(base + db);
        case (kind_at(r, c, 0, 0))
          0:       mos[r*W + c] = tr[r*W + c];
          3:       mos[r*W + c] = tb[r*W + c];
          default: mos[r*W + c] = tg[r*W + c];
        endcase
      end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_pixel = DW'(mos[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk) in_valid = 1'b0;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int r, c, i, er, eg, eb, em;
    r = n_out / W;
    c = n_out % W;
    i = r*W + c;
    expect_rgb(mos, W, H, r, c, kind_at(r, c, 0, 0), 255, er, eg, eb, em, n_clamp);
    checks++;
    if (!(int'(out_r) == er && int'(out_g) == eg && int'(out_b) == eb)) begin
      failures++;
      if (failures < 10) $display("FAIL: (%0d,%0d) differs from the reference model", r, c);
    end
    if (r >= 2 && r < H-2 && c >= 2 && c < W-2) begin
      se_dut += real'((int'(out_r) - tr[i]) ** 2 + (int'(out_g) - tg[i]) ** 2 + (int'(out_b) - tb[i]) ** 2);
      se_bil += real'((bilin(r,c,0) - tr[i]) ** 2 + (bilin(r,c,1) - tg[i]) ** 2 + (bilin(r,c,2) - tb[i]) ** 2);
      n_se += 3;
    end
    n_out++;
  end

  initial begin
    real p_dut, p_bil;
    wait (n_out == W*H);
    p_dut = 10.0 * $log10(255.0 * 255.0 * n_se / (se_dut + 1e-9));
    p_bil = 10.0 * $log10(255.0 * 255.0 * n_se / (se_bil + 1e-9));
    $display("CPSNR processor %0.2f dB, bilinear %0.2f dB", p_dut, p_bil);
    checks++;
    if (!(p_dut > p_bil)) begin failures++; $display("FAIL: not better than bilinear"); end
    checks++;
    if (!(p_dut >= 25.0)) begin failures++; $display("FAIL: CPSNR below 25 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (W*H + 4*W + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
