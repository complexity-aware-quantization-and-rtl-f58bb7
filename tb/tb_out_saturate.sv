// tb_out_saturate: checks the scale-back and saturation stage with the
// filter's sizes (24 fraction bits, left shift 2, 16-bit output) and with a
// 24-bit output that needs zero padding, against an integer model:
// in range, y = v * 2^2 truncated; otherwise the extreme value and a flag.
module tb_out_saturate;
  int checks = 0, failures = 0;
  logic signed [24:0] v;
  logic signed [15:0] y0;  logic sp0, sn0;
  logic signed [23:0] y1;  logic sp1, sn1;

  out_saturate #(.FI(24), .SH(2), .W_OUT(16)) u0 (.v(v), .y(y0), .sat_pos(sp0), .sat_neg(sn0));
  out_saturate #(.FI(24), .SH(2), .W_OUT(24)) u1 (.v(v), .y(y1), .sat_pos(sp1), .sat_neg(sn1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    longint vi, lim;
    bit sp, sn;
    lim = longint'(1) <<< 22;
    for (int n = 0; n < 20000; n++) begin
      case (n)
        0: v = 25'(lim); 1: v = 25'(lim - 1); 2: v = 25'(-lim); 3: v = 25'(-lim - 1);
        default: v = (n % 2) ? 25'($urandom) : 25'(int'($urandom_range(0, 1 << 23)) - (1 << 22));
      endcase
      #1;
      vi = longint'(v);
      sp = vi >= lim;  sn = vi < -lim;
      check(sp0 == sp && sn0 == sn && sp1 == sp && sn1 == sn, $sformatf("flags v=%0d", vi));
      if (sp)      begin check(y0 == 16'sh7fff, "pos16"); check(y1 == 24'sh7fffff, "pos24"); end
      else if (sn) begin check(y0 == 16'sh8000, "neg16"); check(y1 == 24'sh800000, "neg24"); end
      else begin
        check(longint'(y0) == (vi >>> 7), $sformatf("y16 v=%0d y=%0d", vi, y0));
        check(longint'(y1) == (vi <<< 1), $sformatf("y24 v=%0d y=%0d", vi, y1));
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
