// tb_bs_frame_ctrl: the bit-position counter must count 0..24 and wrap, and
// frame_start must be high exactly once every 25 cycles, in the cycles where
// the count is 0, starting with the first cycle after reset.
module tb_bs_frame_ctrl;
  localparam int W = 25;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] cnt;
  logic frame_start;

  bs_frame_ctrl #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int last_start = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 40 * W; c++) begin
      #1;
      checks++;
      if (cnt != 5'(c % W) || frame_start != (c % W == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d cnt=%0d start=%0b", c, cnt, frame_start);
      end
      if (frame_start) begin
        if (last_start >= 0) begin checks++; if (c - last_start != W) failures++; end
        last_start = c;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * W) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
