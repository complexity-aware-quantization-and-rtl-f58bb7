// tb_sa_adder_tree: the word-level shift-add graph must produce, exactly, the
// inner product sum COEF[k]*x[k] (the root has 24 fraction bits and holds y/4,
// so its integer value equals the integer inner product of 16-bit samples and
// 7-bit coefficients). Checked on all 16 combinations of the extreme inputs,
// which are the worst cases for internal overflow, and on random inputs.
module tb_sa_adder_tree;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic signed [15:0] x [TAPS];
  logic signed [24:0] root;

  sa_adder_tree #(.W(16)) dut (.x(x), .root(root));

  initial begin
    longint acc;
    for (int n = 0; n < 20000; n++) begin
      for (int k = 0; k < TAPS; k++)
        if (n < 16) x[k] = n[k] ? 16'sh7fff : 16'sh8000;
        else        x[k] = 16'($urandom);
      #1;
      acc = 0;
      for (int k = 0; k < TAPS; k++) acc += longint'(COEF[k]) * longint'(x[k]);
      checks++;
      if (longint'(root) != acc) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d %0d %0d %0d root=%0d exp=%0d",
                                    x[0], x[1], x[2], x[3], root, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
