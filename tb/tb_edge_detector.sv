// tb_edge_detector: random and extreme inputs; DH, DV and TD are compared with
// sums of absolute differences computed in the testbench.
module tb_edge_detector;
  localparam int DW = 8;
  logic          clk = 1'b0;
  logic [DW-1:0] g_left, g_right, g_up, g_down, d_ul, d_ur, d_dl, d_dr;
  logic [DW+1:0] dh, dv;
  logic [DW+2:0] td;
  int            checks = 0, failures = 0;

  edge_detector #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ad(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int edh, edv;
      @(negedge clk);
      if (n < 16) begin
        {g_left, g_right, g_up, g_down} = {4{(n[0] ? 8'hFF : 8'h00)}} ^ 32'(n * 32'h0F0F_F00F);
        {d_ul, d_ur, d_dl, d_dr}        = {4{(n[1] ? 8'hFF : 8'h00)}} ^ 32'(n * 32'hFF00_00FF);
      end else begin
        {g_left, g_right, g_up, g_down} = $urandom;
        {d_ul, d_ur, d_dl, d_dr}        = $urandom;
      end
      #1;
      edh = ad(g_left, g_right) + ad(d_ul, d_ur) + ad(d_dl, d_dr);
      edv = ad(g_up, g_down) + ad(d_ul, d_dl) + ad(d_ur, d_dr);
      checks++;
      if (int'(dh) != edh || int'(dv) != edv || int'(td) != edh + edv) begin
        failures++;
        if (failures < 10) $display("FAIL: dh %0d/%0d dv %0d/%0d td %0d", dh, edh, dv, edv, td);
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
