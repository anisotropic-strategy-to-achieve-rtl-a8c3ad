// tb_line_buffer: checks that the two line-buffer taps return the sample pushed one
// line (mid_out) and two lines (top_out) earlier, with random pauses in the pushes.
module tb_line_buffer;
  localparam int DW = 8;
  localparam int W  = 7;

  logic          clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0;
  logic [DW-1:0] din = '0, mid_out, top_out;
  int            checks = 0, failures = 0;
  int            hist [$];

  line_buffer #(.DW(DW), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      shift_en = ($urandom_range(3) != 0);
      din      = DW'($urandom);
      #1;
      if (shift_en) begin
        if (hist.size() >= W) begin
          checks++;
          if (mid_out !== DW'(hist[hist.size()-W])) begin
            failures++;
            $display("FAIL: mid_out %0d expected %0d", mid_out, hist[hist.size()-W]);
          end
        end
        if (hist.size() >= 2*W) begin
          checks++;
          if (top_out !== DW'(hist[hist.size()-2*W])) begin
            failures++;
            $display("FAIL: top_out %0d expected %0d", top_out, hist[hist.size()-2*W]);
          end
        end
        hist.push_back(int'(din));
      end
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
