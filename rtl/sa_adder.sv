// sa_adder: one word-level node of the shift-add dataflow graph,
//   y = (a >>> KA) + (b >>> KB)      or, with SUB = 1,   (a >>> KA) - (b >>> KB).
// Operands and result are two's complement fractions in [-1,1): one sign bit
// and FA, FB or FO fractional bits. A right shift on an input is a prescaling
// that keeps the sum inside [-1,1); it is exact here because the result keeps
// FO = max(FA+KA, FB+KB) fractional bits (full precision), so the shifted-out
// bits become fraction bits instead of being lost. The node needs no integer
// guard bit: the enclosing graph's peak-estimation analysis guarantees the sum
// cannot overflow. A subtractor is an adder with b inverted and carry-in 1.
// Purely combinational (the graph is not pipelined).
module sa_adder #(
  parameter int FA  = 15,
  parameter int FB  = 15,
  parameter int KA  = 1,
  parameter int KB  = 1,
  parameter bit SUB = 1'b0,
  localparam int FO = fir_pkg::add_frac(FA, KA, FB, KB)
) (
  input  logic signed [FA:0] a,
  input  logic signed [FB:0] b,
  output logic signed [FO:0] y
);

  logic signed [FO:0] a_al, b_al;

  // Align both operands to FO fractional bits: sign-extend by the shift, then
  // pad zeros below.
  always_comb begin
    a_al = (FO+1)'(a) <<< (FO - FA - KA);
    b_al = (FO+1)'(b) <<< (FO - FB - KB);
    y    = SUB ? (a_al + ~b_al + 1'b1) : (a_al + b_al);
  end

endmodule
