// tb_cfa_interp_phases: the four Bayer phases (RGGB, GRBG, GBRG, BGGR, set by
// R_ROW/R_COL) side by side. Each processor gets the same two 10 x 6 random frames
// with input gaps, and every output pixel is compared with the reference model for
// its phase.
module tb_cfa_interp_phases;
  import cfa_pkg::*;
  import cfa_ref_pkg::*;

  localparam int W  = 10;
  localparam int H  = 6;
  localparam int DW = 8;
  localparam int NF = 2;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [DW-1:0] in_pixel = '0;
  logic          in_valid = 1'b0;
  logic [3:0]    in_ready, out_valid;
  int            checks = 0, failures = 0;
  int            img [NF][];
  int            n_out [4] = '{0, 0, 0, 0};
  int            n_clamp = 0;

  always #5 clk = ~clk;

  for (genvar p = 0; p < 4; p++) begin : g_phase
    localparam bit RR = p[1];
    localparam bit RC = p[0];
    logic [DW-1:0] out_r, out_g, out_b;
    logic [15:0]   out_row, out_col;
    ptype_e        out_ptype;
    gmode_e        out_gmode;

    cfa_interp_top #(.DW(DW), .WIDTH(W), .HEIGHT(H), .R_ROW(RR), .R_COL(RC)) dut (
      .clk, .rst_n, .in_pixel, .in_valid, .in_ready(in_ready[p]), .out_valid(out_valid[p]),
      .out_r, .out_g, .out_b, .out_row, .out_col, .out_ptype, .out_gmode
    );

    always @(posedge clk) if (rst_n && out_valid[p]) begin
      int f, idx, r, c, k, er, eg, eb, em;
      f   = n_out[p] / (W*H);
      idx = n_out[p] % (W*H);
      r   = idx / W;
      c   = idx % W;
      k   = kind_at(r, c, int'(RR), int'(RC));
      if (f < NF) begin
        expect_rgb(img[f], W, H, r, c, k, 255, er, eg, eb, em, n_clamp);
        checks++;
        if (!(int'(out_ptype) == k && int'(out_r) == er && int'(out_g) == eg &&
              int'(out_b) == eb && out_row == 16'(r) && out_col == 16'(c))) begin
          failures++;
          if (failures < 20)
            $display("FAIL: phase %0d (%0d,%0d) got %0d/%0d/%0d expected %0d/%0d/%0d",
                     p, r, c, out_r, out_g, out_b, er, eg, eb);
        end
      end
      n_out[p]++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      img[f] = new[W*H];
      foreach (img[f][i]) img[f][i] = $urandom_range(255);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < W*H; i++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_pixel = DW'(img[f][i]);
        @(posedge clk);
        while (!in_ready[0]) @(posedge clk);
      end
      @(negedge clk) in_valid = 1'b0;
    end
    wait (n_out[0] == NF*W*H && n_out[1] == NF*W*H && n_out[2] == NF*W*H && n_out[3] == NF*W*H);
    repeat (3) @(posedge clk);
    checks++;
    if (in_ready != 4'hF) begin
      failures++;
      $display("FAIL: processors out of step, in_ready=%b", in_ready);
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
