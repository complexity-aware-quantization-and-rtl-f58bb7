// tb_fir_bitserial: bit-serial filter at its default size (16-bit samples,
// 25-cycle frames, adder depth 5) and at 8-bit samples (17-cycle frames) with
// every adder registered (adder depth 1). For each, a sample
// is supplied in every frame and each output is checked against the integer
// reference sum COEF[k]*x[n-k], saturated and scaled to a 16-bit fraction,
// together with the frame period and the latency of W + 11 cycles (depth 5)
// or W + 15 cycles (depth 1) from the
// sample_take cycle. Both saturation directions must occur.
module tb_fir_bitserial;
  import fir_pkg::*;
  localparam int NS = 800;
  localparam int NC = 2;
  localparam int CWX [NC] = '{16, 8};
  localparam int CDP [NC] = '{5, 1};    // adder depth
  localparam int CDR [NC] = '{11, 15};  // root offset worked out by hand

  int checks = 0, failures = 0;
  int n_pos [NC], n_neg [NC], done [NC];
  logic clk = 0, rst_n = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int WX  = CWX[g];
    localparam int W   = WX + 9;
    localparam int LAT = W + CDR[g];
    localparam int FY  = WX - 1 + COEF_FRAC;   // fraction bits of the exact sum
    logic signed [WX-1:0] x_in, xs [NS];
    logic take, yv, sp, sn;
    logic signed [15:0] y;
    longint tk [NS];
    int nt = 0, no = 0;

    fir_bitserial #(.W_X(WX), .W_OUT(16), .ADDER_DEPTH(CDP[g])) dut (.clk, .rst_n, .x_in, .sample_take(take),
      .y_valid(yv), .y, .sat_pos(sp), .sat_neg(sn));

    initial begin
      n_pos[g] = 0; n_neg[g] = 0; done[g] = 0;
      for (int n = 0; n < NS; n++) begin
        int m;
        m = n % 30;
        if      (m < 4)             xs[n] = (m == 2) ? {1'b1, {(WX-1){1'b0}}} : {1'b0, {(WX-1){1'b1}}};
        else if (m >= 15 && m < 19) xs[n] = (m == 17) ? {1'b0, {(WX-1){1'b1}}} : {1'b1, {(WX-1){1'b0}}};
        else                        xs[n] = WX'($urandom);
      end
    end

    // The sample in front of the filter is xs[nt]; nt advances with each take.
    assign x_in = (nt < NS) ? xs[nt] : '0;
    always @(posedge clk) if (rst_n && take && nt < NS) begin
      tk[nt] <= cyc;
      if (nt > 0) check(cyc - tk[nt-1] == W, "frame period");
      nt <= nt + 1;
    end

    // Every output pulse after the first expected one must come on time.
    always @(posedge clk) if (rst_n && yv && nt > 0 && no < nt && cyc - tk[no] != LAT &&
                              (no > 0 || cyc > tk[0] + LAT))
      check(1'b0, $sformatf("cfg %0d output at an unexpected cycle", g));

    always @(posedge clk) if (rst_n && yv && no < nt && cyc - tk[no] == LAT) begin
      longint a, lim;
      bit esp, esn;
      logic signed [15:0] e;
      a = 0;
      for (int k = 0; k < TAPS; k++) if (no - k >= 0) a += longint'(COEF[k]) * longint'(xs[no-k]);
      lim = longint'(1) <<< FY;
      esp = a >= lim;  esn = a < -lim;
      if (esp)      e = 16'sh7fff;
      else if (esn) e = 16'sh8000;
      else if (FY >= 15) e = 16'(a >>> (FY - 15));
      else          e = 16'(a <<< (15 - FY));
      check(y == e && sp == esp && sn == esn,
            $sformatf("cfg %0d y[%0d]=%0d exp %0d", g, no, y, e));
      if (esp) n_pos[g]++;
      if (esn) n_neg[g]++;
      no++;
      if (no == NS) done[g] = 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done[0] && done[1]);
    for (int g = 0; g < NC; g++) check(n_pos[g] > 0 && n_neg[g] > 0, "both saturations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 25 + 500) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
