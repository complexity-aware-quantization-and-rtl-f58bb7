// tb_bs_adder_tree: feeds the bit-serial adder tree with four serial taps, tap
// k carrying sample n-k in the frame of sample n (offset 1, 25-bit words
// {sample, 9 zeros}), and checks that the root equals the exact inner
// product sum COEF[k]*x[n-k] for every frame, including extreme samples, and
// is zero before the first sample. Three instances with adder depth 5, 2 and
// 1 must deliver the root at offsets 11, 13 and 15, worked out by hand from
// the graph (registers after the fifth, second or every adder of a chain).
module tb_bs_adder_tree;
  import fir_pkg::*;
  localparam int W = 25, DX = 1, NW = 500, NC = 3;
  localparam int CDP [NC] = '{5, 2, 1};
  localparam int CDR [NC] = '{11, 13, 15};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] cnt = '0;
  int c = 0;
  logic x [TAPS];
  logic signed [15:0] xs [NW];

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin c <= c + 1; cnt <= 5'((c + 1) % W); end

  initial for (int n = 0; n < NW; n++)
    xs[n] = (n % 5 == 0) ? ((n % 10 == 0) ? 16'sh8000 : 16'sh7fff) : 16'($urandom);

  function automatic logic tap_bit(input int cc, input int k);
    int n, i;
    logic [W-1:0] wd;
    if (cc < DX) return 1'b0;
    n = (cc - DX) / W - k;  i = (cc - DX) % W;
    wd = (n >= 0 && n < NW) ? {xs[n], 9'b0} : '0;
    return wd[i];
  endfunction

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    assign x[k] = tap_bit(c, k);
  end

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int DR = CDR[g];
    logic root;
    logic [W-1:0] acc_r;

    bs_adder_tree #(.W(W), .DX(DX), .ADDER_DEPTH(CDP[g])) dut (.clk, .rst_n, .cnt, .x, .root);

    always @(negedge clk) if (rst_n) begin
      if (c < DR) begin
        checks++; if (root !== 1'b0) failures++;
      end else if ((c - DR) / W < NW) begin
        int n, i;
        n = (c - DR) / W;  i = (c - DR) % W;
        acc_r[i] = root;
        if (i == W - 1) begin
          longint e;
          e = 0;
          for (int k = 0; k < TAPS; k++) if (n - k >= 0) e += longint'(COEF[k]) * longint'(xs[n-k]);
          checks++;
          if (longint'(signed'(acc_r)) != e) begin
            failures++;
            if (failures < 10) $display("FAIL depth %0d frame %0d root %0d exp %0d", CDP[g], n, signed'(acc_r), e);
          end
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (c >= (NW + 2) * W);
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
