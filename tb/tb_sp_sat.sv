// tb_sp_sat: sends random 25-bit words LSB first at offset 15 (the root
// offset of the filter) and checks that y_valid pulses once per 25 cycles,
// one cycle after each word's sign bit, with y the word shifted left by 2,
// saturated to a 16-bit fraction and truncated, and with matching flags.
// Words near and beyond the saturation limits are included.
module tb_sp_sat;
  localparam int W = 25, D = 15, NW = 600;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] cnt = '0;
  int c = 0;
  logic sin, y_valid, sat_pos, sat_neg;
  logic signed [15:0] y;
  logic [W-1:0] words [NW];
  int n_out = 0;

  sp_sat #(.W(W), .D(D), .SH(2), .W_OUT(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin c <= c + 1; cnt <= 5'((c + 1) % W); end

  initial for (int n = 0; n < NW; n++) begin
    case (n % 8)
      0: words[n] = 25'(1 << 22);
      1: words[n] = 25'((1 << 22) - 1);
      2: words[n] = 25'(-(1 << 22));
      3: words[n] = 25'(-(1 << 22) - 1);
      default: words[n] = W'($urandom);
    endcase
  end

  assign sin = (c >= D && (c - D) / W < NW) ? words[(c - D) / W][(c - D) % W] : 1'b0;

  always @(negedge clk) if (rst_n && y_valid && n_out < NW) begin
    // The first pulse (at c = D + W - 1 + 1 - W ... before data) carries the
    // all-zero word from reset; data word n completes at c = D + n*W + W.
    if (c < D + W) begin
      checks++; if (y !== 0) failures++;
    end else begin
      longint v; logic signed [15:0] e; bit sp, sn;
      int n;
      n = (c - D - W) / W;
      checks++;
      if ((c - D - W) % W != 0) failures++;
      v  = longint'(signed'(words[n]));
      sp = v >= (1 << 22);  sn = v < -(1 << 22);
      e  = sp ? 16'sh7fff : sn ? 16'sh8000 : 16'(v >>> 7);
      checks++;
      if (y !== e || sat_pos !== sp || sat_neg !== sn) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d y=%0d exp %0d", n, y, e);
      end
      n_out++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (c >= (NW + 2) * W);
    checks++; if (n_out < NW) begin failures++; $display("FAIL %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NW + 10) * W) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
