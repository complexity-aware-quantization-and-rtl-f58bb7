// tb_fir_top: end-to-end test of the example FIR filter at its default sizes.
// A stream of samples (random full-scale, small, extreme and saturating
// patterns) is sent once per frame. Each output of the word-level and of the
// bit-serial filter is compared with a reference computed directly from the
// coefficients {59,46,-77,38}/128 in integer arithmetic, with saturation to
// 16-bit fractions and truncation. It checks the latencies (1 cycle word
// level, 36 cycles bit-serial (adder depth 5), one sample every 25 cycles), the saturation
// flags, the zero output before the first sample, and counts positive and
// negative saturation events, each of which must occur.
module tb_fir_top;
  import fir_pkg::*;

  localparam int NS      = 1500;   // samples
  localparam int FRAME   = 25;
  localparam int LAT_SER = 36;   // 25-cycle frame + root offset 11

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] x_in;  // driven from xs below
  logic sample_take, y_word_valid, y_ser_valid;
  logic signed [15:0] y_word, y_ser;
  logic word_sat_pos, word_sat_neg, ser_sat_pos, ser_sat_neg;

  fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_in = 0;
  longint cyc = 0;
  logic signed [15:0] xs [NS];
  longint take_cyc [NS];
  int ntake = 0, nword = 0, nser = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic logic signed [15:0] pick(input int n);
    int r = int'($urandom_range(0, 9));
    case (r)
      0: return 16'sh7fff;
      1: return 16'sh8000;
      2: return 16'(int'($urandom_range(0, 64)) - 32);
      3: return 16'sh0000;
      default: return 16'($urandom);
    endcase
  endfunction

  // Saturating stream patterns every 50 samples, random otherwise.
  function automatic logic signed [15:0] stim(input int n);
    int m = n % 50;
    if (m >= 10 && m < 14) return (m == 12) ? 16'sh8000 : 16'sh7fff;  // x[n-1]=-1 ... pattern
    if (m >= 30 && m < 34) return (m == 32) ? 16'sh7fff : 16'sh8000;
    return pick(n);
  endfunction

  function automatic void ref_out(input int n, output logic signed [15:0] y,
                                  output bit sp, output bit sn);
    longint acc = 0;
    for (int k = 0; k < TAPS; k++)
      if (n - k >= 0) acc += longint'(COEF[k]) * longint'(xs[n-k]);
    sp = (acc >= (longint'(1) <<< 22));
    sn = (acc <  -(longint'(1) <<< 22));
    if (sp)      y = 16'sh7fff;
    else if (sn) y = 16'sh8000;
    else         y = 16'(acc >>> 7);
  endfunction

  // Source: the sample in front of the filter is xs[ntake].
  initial for (int n = 0; n < NS; n++) xs[n] = stim(n);
  assign x_in = (ntake < NS) ? xs[ntake] : '0;

  always @(posedge clk) begin
    if (rst_n && sample_take && ntake < NS) begin
      take_cyc[ntake] <= cyc;
      if (ntake > 0) check(cyc - take_cyc[ntake-1] == FRAME, "sample period");
      ntake <= ntake + 1;
    end
  end

  // Word-level output.
  always @(posedge clk) begin
    logic signed [15:0] ye; bit sp, sn;
    if (rst_n && y_word_valid && nword < ntake) begin
      ref_out(nword, ye, sp, sn);
      check(cyc - take_cyc[nword] == 1, "word latency");
      check(y_word == ye, $sformatf("word y[%0d]=%0d exp %0d", nword, y_word, ye));
      check(word_sat_pos == sp && word_sat_neg == sn, "word sat flags");
      nword++;
    end
  end

  // Bit-serial output.
  always @(posedge clk) begin
    logic signed [15:0] ye; bit sp, sn;
    if (rst_n && y_ser_valid) begin
      if (nser < ntake && cyc - take_cyc[nser] == LAT_SER) begin
        ref_out(nser, ye, sp, sn);
        check(y_ser == ye, $sformatf("serial y[%0d]=%0d exp %0d", nser, y_ser, ye));
        check(ser_sat_pos == sp && ser_sat_neg == sn, "serial sat flags");
        if (sp) n_pos++; else if (sn) n_neg++; else n_in++;
        nser++;
      end else if (nser == 0) begin
        check(y_ser == 0, "zero output before the first sample");
      end else if (nser < NS) begin
        check(0, "serial output at an unexpected cycle");
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (nser == NS && nword == NS);
    check(n_pos > 0, "positive saturation occurred");
    check(n_neg > 0, "negative saturation occurred");
    check(n_in > 0, "in-range outputs occurred");
    $display("mechanisms: positive saturation %0d, negative saturation %0d, in range %0d",
             n_pos, n_neg, n_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * FRAME + 2000) @(posedge clk);
    failures++;
    $display("watchdog: word %0d serial %0d of %0d", nword, nser, NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
