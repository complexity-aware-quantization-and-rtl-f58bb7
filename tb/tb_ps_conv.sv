// tb_ps_conv: loads a random 16-bit sample every 25 cycles and checks that
// the serial output presents the 25-bit word {sample, 9 zero bits} LSB first,
// bit i in the (i+1)-th cycle after the load, and zero after reset.
module tb_ps_conv;
  localparam int WI = 16, W = 25, NW = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, sout;
  logic [WI-1:0] din = '0;
  ps_conv #(.W_IN(WI), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [W-1:0] word;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (sout !== 1'b0) failures++;
    rst_n = 1;
    for (int n = 0; n < NW; n++) begin
      din  = WI'($urandom);
      if (n == 0) din = 16'h8001;
      load = 1;
      word = {din, {(W - WI){1'b0}}};
      @(negedge clk);
      load = 0;
      din  = WI'($urandom);   // must be ignored until the next load
      for (int i = 0; i < W; i++) begin
        checks++;
        if (sout !== word[i]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d bit %0d", n, i);
        end
        if (i < W - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NW + 4) * W) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
