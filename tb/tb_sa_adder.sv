// tb_sa_adder: checks the word-level shift-add node in two configurations, a
// subtractor with unequal input widths and shifts and a plain adder, against
// a 64-bit integer model of (a * 2^-KA) +/- (b * 2^-KB) kept to FO fraction
// bits (two's complement, wrapping like the node itself).
module tb_sa_adder;
  int checks = 0, failures = 0;

  // Configuration 0: a has 15, b 18 fraction bits, y = a>>1 - b>>2, FO = 20.
  logic signed [15:0] a0;  logic signed [18:0] b0;  logic signed [20:0] y0;
  sa_adder #(.FA(15), .FB(18), .KA(1), .KB(2), .SUB(1'b1)) u0 (.a(a0), .b(b0), .y(y0));
  // Configuration 1: y = a>>3 + b, a and b with 20 fraction bits, FO = 23.
  logic signed [20:0] a1, b1;  logic signed [23:0] y1;
  sa_adder #(.FA(20), .FB(20), .KA(3), .KB(0), .SUB(1'b0)) u1 (.a(a1), .b(b1), .y(y1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    longint e;
    for (int n = 0; n < 4000; n++) begin
      a0 = 16'($urandom); b0 = 19'($urandom);
      a1 = 21'($urandom); b1 = 21'($urandom);
      if (n < 4) begin a0 = n[0] ? 16'sh7fff : 16'sh8000; b0 = n[1] ? 19'sh3ffff : 19'sh40000; end
      #1;
      e = (longint'(a0) <<< 4) - (longint'(b0) <<< 0);
      check(y0 == 21'(e), $sformatf("sub a=%0d b=%0d y=%0d exp=%0d", a0, b0, y0, e));
      e = longint'(a1) + (longint'(b1) <<< 3);
      check(y1 == 24'(e), $sformatf("add a=%0d b=%0d y=%0d exp=%0d", a1, b1, y1, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
