// out_saturate: converts the adder-tree root back to an output fraction.
// The root holds y / 2^SH (its radix point is -SH), so the value is shifted
// left by SH. Results outside [-1,1) saturate to the most negative or most
// positive W_OUT-bit fraction; in range, the W_OUT-1 fraction bits below the
// sign are kept and lower bits are dropped (truncation toward minus infinity).
// If the root has fewer fraction bits than the output needs, zeros are
// appended. Overflow is detected when the SH+1 top bits of the root differ.
// Saturation follows the method; truncation of the low bits is this design's
// choice. Purely combinational; sat_pos / sat_neg flag the two overflows.
module out_saturate #(
  parameter int FI    = 24,   // fraction bits of the root value
  parameter int SH    = 2,    // left shift
  parameter int W_OUT = 16,
  localparam int PAD  = ((W_OUT - 1) > (FI - SH)) ? (W_OUT - 1) - (FI - SH) : 0
) (
  input  logic signed [FI:0]      v,
  output logic signed [W_OUT-1:0] y,
  output logic                    sat_pos,
  output logic                    sat_neg
);

  logic [FI+PAD:0] v_ext;     // v with zero fraction bits appended
  logic            ovf;

  always_comb begin
    v_ext   = {v, {PAD{1'b0}}};
    // In range only when bits FI .. FI-SH are all equal to the sign.
    ovf     = (v[FI:FI-SH] != {(SH+1){v[FI]}});
    sat_pos = ovf && !v[FI];
    sat_neg = ovf &&  v[FI];
    if (sat_pos)      y = {1'b0, {(W_OUT-1){1'b1}}};
    else if (sat_neg) y = {1'b1, {(W_OUT-1){1'b0}}};
    else              y = v_ext[FI+PAD-SH -: W_OUT];
  end

endmodule
