// tb_tap_delay_line: drives an 8-bit, 4-tap delay line with 3 flip-flops per
// stage and a random enable, and compares every tap with a software history
// of the enabled inputs (taps[k] = the input k*3 enabled cycles ago, zero
// after reset).
module tb_tap_delay_line;
  localparam int W = 8, TAPS = 4, SL = 3, N = 3000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] din = '0;
  logic [W-1:0] taps [TAPS];
  logic [W-1:0] hist [$];

  tap_delay_line #(.W(W), .TAPS(TAPS), .STAGE_LEN(SL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < TAPS * SL; i++) hist.push_front('0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = W'($urandom);
      #1;
      for (int k = 0; k < TAPS; k++) begin
        logic [W-1:0] e;
        e = (k == 0) ? din : hist[k*SL - 1];
        checks++;
        if (taps[k] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d tap %0d = %0h exp %0h", n, k, taps[k], e);
        end
      end
      @(posedge clk);
      if (en) begin hist.push_front(din); void'(hist.pop_back()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 3 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
