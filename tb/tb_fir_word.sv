// tb_fir_word: word-level filter with a random in_valid pattern (gaps and
// back-to-back samples). Two instances run on the same stream: the default
// 16-bit output and a 23-bit output that keeps the full precision, so the
// adder graph is checked exactly. Every output must appear one cycle after
// its sample and equal the integer reference sum COEF[k]*x[n-k], saturated
// to [-1,1); holding in_valid low must freeze the delay line. Both
// saturation directions must occur.
module tb_fir_word;
  import fir_pkg::*;
  localparam int NS = 4000;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] x_in = '0;
  logic yv0, yv1, sp0, sn0, sp1, sn1;
  logic signed [15:0] y0;
  logic signed [22:0] y1;
  logic signed [15:0] xs [NS];
  int nin = 0, nout = 0;
  bit pend = 0;

  fir_word #(.W(16), .W_OUT(16)) u0 (.clk, .rst_n, .in_valid, .x_in,
    .y_valid(yv0), .y(y0), .sat_pos(sp0), .sat_neg(sn0));
  fir_word #(.W(16), .W_OUT(23)) u1 (.clk, .rst_n, .in_valid, .x_in,
    .y_valid(yv1), .y(y1), .sat_pos(sp1), .sat_neg(sn1));

  always #5 clk = ~clk;

  function automatic longint acc_of(input int n);
    longint a;
    a = 0;
    for (int k = 0; k < TAPS; k++) if (n - k >= 0) a += longint'(COEF[k]) * longint'(xs[n-k]);
    return a;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial for (int n = 0; n < NS; n++) begin
    int m;
    m = n % 40;
    if      (m < 4)             xs[n] = (m == 2) ? 16'sh8000 : 16'sh7fff;
    else if (m >= 20 && m < 24) xs[n] = (m == 22) ? 16'sh7fff : 16'sh8000;
    else                        xs[n] = 16'($urandom);
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (nin < NS || pend) begin
      @(negedge clk);
      // Check the output produced by the previous cycle's sample.
      check(yv0 == pend && yv1 == pend, "valid one cycle after the sample");
      if (pend) begin
        longint a, lim;
        bit sp, sn;
        a = acc_of(nout);  lim = longint'(1) <<< 22;
        sp = a >= lim;  sn = a < -lim;
        if (sp) n_pos++;
        if (sn) n_neg++;
        check(sp0 == sp && sn0 == sn && sp1 == sp && sn1 == sn, "flags");
        check(y0 == (sp ? 16'sh7fff : sn ? 16'sh8000 : 16'(a >>> 7)),
              $sformatf("y16[%0d]=%0d", nout, y0));
        check(y1 == (sp ? 23'sh3fffff : sn ? 23'sh400000 : 23'(a)),
              $sformatf("y23[%0d]=%0d", nout, y1));
        nout++;
      end
      in_valid = (nin < NS) && ($urandom_range(0, 2) != 0);
      x_in     = in_valid ? xs[nin] : 16'($urandom);
      pend     = in_valid;
      if (in_valid) nin++;
    end
    check(n_pos > 0 && n_neg > 0, "both saturation directions occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 3 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
