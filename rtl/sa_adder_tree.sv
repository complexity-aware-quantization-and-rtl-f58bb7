// sa_adder_tree: the word-level shift-add dataflow graph of the example filter,
// the full inner product of four taps with constant coefficients.
// It is made of two parts: a subexpression generator (S0 = x0+x2, the common
// subexpression across the h0 and h2 coefficients, and T = S0 + S0>>1, the bit
// pair shared within it) and a symmetric binary summation tree of depth 4 over
// the 11 remaining nonzero terms, leaves ordered by shift so that neighbouring
// leaves have similar shifts. The edge shifts, taken from fir_pkg, are those of
// the peak-estimation analysis: every node output stays within [-1,1), so the
// tree cannot overflow. Each node has its own full-precision width; the root
// carries the fraction y/4 with (W_IN-1)+9 fractional bits.
// Interface: taps x[0] = x[n] .. x[3] = x[n-3]; root = y[n]/2^OUT_SHIFT.
// Purely combinational: 12 adders, 4 adder levels after the generator.
module sa_adder_tree
  import fir_pkg::*;
#(
  parameter int W   = W_IN,
  localparam int FX = W - 1,
  localparam int FR = node_frac(FX, N_R)
) (
  input  logic signed [W-1:0] x [TAPS],
  output logic signed [FR:0]  root
);

  localparam int F_S0 = node_frac(FX, N_S0);
  localparam int F_T  = node_frac(FX, N_T);
  localparam int F_A1 = node_frac(FX, N_A1);
  localparam int F_A2 = node_frac(FX, N_A2);
  localparam int F_A3 = node_frac(FX, N_A3);
  localparam int F_A4 = node_frac(FX, N_A4);
  localparam int F_A5 = node_frac(FX, N_A5);
  localparam int F_B1 = node_frac(FX, N_B1);
  localparam int F_B2 = node_frac(FX, N_B2);
  localparam int F_B3 = node_frac(FX, N_B3);
  localparam int F_C1 = node_frac(FX, N_C1);

  logic signed [F_S0:0] s0;
  logic signed [F_T:0]  t;
  logic signed [F_A1:0] a1;
  logic signed [F_A2:0] a2;
  logic signed [F_A3:0] a3;
  logic signed [F_A4:0] a4;
  logic signed [F_A5:0] a5;
  logic signed [F_B1:0] b1;
  logic signed [F_B2:0] b2;
  logic signed [F_B3:0] b3;
  logic signed [F_C1:0] c1;

  // Subexpression generator.
  sa_adder #(.FA(FX),   .FB(FX),   .KA(KA[N_S0]), .KB(KB[N_S0]), .SUB(SUB[N_S0]))
    u_s0 (.a(x[0]), .b(x[2]), .y(s0));
  sa_adder #(.FA(F_S0), .FB(F_S0), .KA(KA[N_T]),  .KB(KB[N_T]),  .SUB(SUB[N_T]))
    u_t  (.a(s0),   .b(s0),   .y(t));

  // Level 1: pairs of leaves with equal or similar shifts.
  sa_adder #(.FA(FX),  .FB(FX), .KA(KA[N_A1]), .KB(KB[N_A1]), .SUB(SUB[N_A1]))
    u_a1 (.a(x[1]), .b(x[3]), .y(a1));   // x1>>6 + x3>>6
  sa_adder #(.FA(FX),  .FB(FX), .KA(KA[N_A2]), .KB(KB[N_A2]), .SUB(SUB[N_A2]))
    u_a2 (.a(x[1]), .b(x[3]), .y(a2));   // x1>>5 + x3>>5
  sa_adder #(.FA(FX),  .FB(FX), .KA(KA[N_A3]), .KB(KB[N_A3]), .SUB(SUB[N_A3]))
    u_a3 (.a(x[0]), .b(x[1]), .y(a3));   // x0>>4 + x1>>4
  sa_adder #(.FA(FX),  .FB(FX), .KA(KA[N_A4]), .KB(KB[N_A4]), .SUB(SUB[N_A4]))
    u_a4 (.a(x[1]), .b(x[3]), .y(a4));   // x1>>2 + x3>>2
  sa_adder #(.FA(F_T), .FB(FX), .KA(KA[N_A5]), .KB(KB[N_A5]), .SUB(SUB[N_A5]))
    u_a5 (.a(t),    .b(x[2]), .y(a5));   // t>>2 - x2
  // Level 2 (t>>6 joins here).
  sa_adder #(.FA(F_A1), .FB(F_A2), .KA(KA[N_B1]), .KB(KB[N_B1]), .SUB(SUB[N_B1]))
    u_b1 (.a(a1), .b(a2), .y(b1));
  sa_adder #(.FA(F_A3), .FB(F_T),  .KA(KA[N_B2]), .KB(KB[N_B2]), .SUB(SUB[N_B2]))
    u_b2 (.a(a3), .b(t),  .y(b2));
  sa_adder #(.FA(F_A4), .FB(F_A5), .KA(KA[N_B3]), .KB(KB[N_B3]), .SUB(SUB[N_B3]))
    u_b3 (.a(a4), .b(a5), .y(b3));
  // Level 3 and root.
  sa_adder #(.FA(F_B1), .FB(F_B2), .KA(KA[N_C1]), .KB(KB[N_C1]), .SUB(SUB[N_C1]))
    u_c1 (.a(b1), .b(b2), .y(c1));
  sa_adder #(.FA(F_C1), .FB(F_B3), .KA(KA[N_R]),  .KB(KB[N_R]),  .SUB(SUB[N_R]))
    u_r  (.a(c1), .b(b3), .y(root));

endmodule
