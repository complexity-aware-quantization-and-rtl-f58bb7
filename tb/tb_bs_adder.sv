// tb_bs_adder: checks the bit-serial shift-add node in four configurations:
// the subtractor a - b>>3 with both inputs at offset 0, an adder with unequal
// input offsets and shifts on both inputs (a>>2 + b>>1), and a subtractor
// whose input offsets exceed one word length, and a subtractor a>>2 - b with
// an unregistered (combinational) output. Random W-bit words are sent
// LSB first at each input's offset; the output word, collected at offset
// max(DA+KA, DB+KB)+1 (or +0 unregistered), must equal (A >>> KA) +/- (B >>> KB) modulo 2^W.
// This checks the latency, the carry-in at bit 0, the sign extension of the
// shifted operands and the zero output right after reset.
module tb_bs_adder;
  localparam int W  = 25;
  localparam int NW = 300;   // words per configuration
  localparam int NC = 4;
  localparam int CDA [NC] = '{0, 3, 30, 2};
  localparam int CDB [NC] = '{0, 7, 27, 2};
  localparam int CKA [NC] = '{0, 2, 1, 2};
  localparam int CKB [NC] = '{3, 1, 4, 0};
  localparam bit CSB [NC] = '{1'b1, 1'b0, 1'b1, 1'b1};
  localparam bit CRG [NC] = '{1'b1, 1'b1, 1'b1, 1'b0};   // registered output

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] cnt = '0;
  int c = 0;               // cycles since reset release

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin c <= c + 1; cnt <= 5'((c + 1) % W); end

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int DA = CDA[g], DB = CDB[g], KA = CKA[g], KB = CKB[g];
    localparam bit SB = CSB[g], RG = CRG[g];
    localparam int DY = ((DA + KA > DB + KB) ? DA + KA : DB + KB) + int'(RG);
    logic [W-1:0] wa [NW], wb [NW];
    logic a, b, y;

    bs_adder #(.W(W), .DA(DA), .DB(DB), .KA(KA), .KB(KB), .SUB(SB), .REG_OUT(RG))
      dut (.clk, .rst_n, .cnt, .a, .b, .y);

    initial for (int n = 0; n < NW; n++) begin
      wa[n] = W'($urandom);  wb[n] = W'($urandom);
      if (n == 1) begin wa[n] = {1'b1, {(W-1){1'b0}}}; wb[n] = {1'b0, {(W-1){1'b1}}}; end
      if (n == 2) begin wa[n] = {1'b0, {(W-1){1'b1}}}; wb[n] = {1'b1, {(W-1){1'b0}}}; end
    end

    // Inputs: bit (c-D) mod W of word (c-D)/W, zero before the first word.
    always_comb begin
      a = (c >= DA && (c - DA) / W < NW) ? wa[(c - DA) / W][(c - DA) % W] : 1'b0;
      b = (c >= DB && (c - DB) / W < NW) ? wb[(c - DB) / W][(c - DB) % W] : 1'b0;
    end

    logic [W-1:0] acc_y;
    always @(negedge clk) if (rst_n) begin
      if (c < DY) begin
        checks++;
        if (y !== 1'b0) begin failures++; $display("FAIL cfg %0d: nonzero output before data", g); end
      end else if ((c - DY) / W < NW) begin
        int n, i;
        n = (c - DY) / W;  i = (c - DY) % W;
        acc_y[i] = y;
        if (i == W - 1) begin
          logic signed [W-1:0] sa, sb, e;
          sa = signed'(wa[n]);  sb = signed'(wb[n]);
          e  = SB ? (sa >>> KA) - (sb >>> KB) : (sa >>> KA) + (sb >>> KB);
          checks++;
          if (acc_y !== e) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d word %0d: %h exp %h", g, n, acc_y, e);
          end
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (c >= (NW + 3) * W);
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
