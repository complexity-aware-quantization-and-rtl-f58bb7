// bs_adder_tree: the bit-serial version of the example filter's shift-add
// graph (the same 12 nodes and edge shifts as sa_adder_tree, from fir_pkg).
// Every word-level adder is replaced by a bs_adder. All four taps arrive with
// the same offset DX (tap k carries word n-k in the cycles where tap 0 carries
// word n, because the serial delay line delays by whole words). The offset of
// each node output is computed at elaboration time by fir_pkg::node_offset,
// i.e. by accumulating adder and shift latencies from the inputs along the
// graph; each adder uses its input offsets to place its carry-in and
// sign-extension controls. The root leaves with offset DR = node_offset(DX, ADDER_DEPTH, N_R)
// (14 cycles after DX for this graph) and carries y/4 as a W-bit fraction.
module bs_adder_tree
  import fir_pkg::*;
#(
  parameter int W   = 25,
  parameter int DX  = 1,
  parameter int ADDER_DEPTH = 5,
  localparam int CW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] cnt,
  input  logic          x [TAPS],
  output logic          root
);

  localparam int D_S0 = node_offset(DX, ADDER_DEPTH, N_S0);
  localparam int D_T  = node_offset(DX, ADDER_DEPTH, N_T);
  localparam int D_A1 = node_offset(DX, ADDER_DEPTH, N_A1);
  localparam int D_A2 = node_offset(DX, ADDER_DEPTH, N_A2);
  localparam int D_A3 = node_offset(DX, ADDER_DEPTH, N_A3);
  localparam int D_A4 = node_offset(DX, ADDER_DEPTH, N_A4);
  localparam int D_A5 = node_offset(DX, ADDER_DEPTH, N_A5);
  localparam int D_B1 = node_offset(DX, ADDER_DEPTH, N_B1);
  localparam int D_B2 = node_offset(DX, ADDER_DEPTH, N_B2);
  localparam int D_B3 = node_offset(DX, ADDER_DEPTH, N_B3);
  localparam int D_C1 = node_offset(DX, ADDER_DEPTH, N_C1);

  logic s0, t, a1, a2, a3, a4, a5, b1, b2, b3, c1;

  // Subexpression generator.
  bs_adder #(.W(W), .DA(DX),   .DB(DX),   .KA(KA[N_S0]), .KB(KB[N_S0]), .SUB(SUB[N_S0]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_S0)))
    u_s0 (.clk, .rst_n, .cnt, .a(x[0]), .b(x[2]), .y(s0));
  bs_adder #(.W(W), .DA(D_S0), .DB(D_S0), .KA(KA[N_T]),  .KB(KB[N_T]),  .SUB(SUB[N_T]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_T)))
    u_t  (.clk, .rst_n, .cnt, .a(s0),   .b(s0),   .y(t));

  // Summation tree.
  bs_adder #(.W(W), .DA(DX),   .DB(DX),   .KA(KA[N_A1]), .KB(KB[N_A1]), .SUB(SUB[N_A1]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_A1)))
    u_a1 (.clk, .rst_n, .cnt, .a(x[1]), .b(x[3]), .y(a1));
  bs_adder #(.W(W), .DA(DX),   .DB(DX),   .KA(KA[N_A2]), .KB(KB[N_A2]), .SUB(SUB[N_A2]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_A2)))
    u_a2 (.clk, .rst_n, .cnt, .a(x[1]), .b(x[3]), .y(a2));
  bs_adder #(.W(W), .DA(DX),   .DB(DX),   .KA(KA[N_A3]), .KB(KB[N_A3]), .SUB(SUB[N_A3]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_A3)))
    u_a3 (.clk, .rst_n, .cnt, .a(x[0]), .b(x[1]), .y(a3));
  bs_adder #(.W(W), .DA(DX),   .DB(DX),   .KA(KA[N_A4]), .KB(KB[N_A4]), .SUB(SUB[N_A4]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_A4)))
    u_a4 (.clk, .rst_n, .cnt, .a(x[1]), .b(x[3]), .y(a4));
  bs_adder #(.W(W), .DA(D_T),  .DB(DX),   .KA(KA[N_A5]), .KB(KB[N_A5]), .SUB(SUB[N_A5]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_A5)))
    u_a5 (.clk, .rst_n, .cnt, .a(t),    .b(x[2]), .y(a5));
  bs_adder #(.W(W), .DA(D_A1), .DB(D_A2), .KA(KA[N_B1]), .KB(KB[N_B1]), .SUB(SUB[N_B1]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_B1)))
    u_b1 (.clk, .rst_n, .cnt, .a(a1),   .b(a2),   .y(b1));
  bs_adder #(.W(W), .DA(D_A3), .DB(D_T),  .KA(KA[N_B2]), .KB(KB[N_B2]), .SUB(SUB[N_B2]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_B2)))
    u_b2 (.clk, .rst_n, .cnt, .a(a3),   .b(t),    .y(b2));
  bs_adder #(.W(W), .DA(D_A4), .DB(D_A5), .KA(KA[N_B3]), .KB(KB[N_B3]), .SUB(SUB[N_B3]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_B3)))
    u_b3 (.clk, .rst_n, .cnt, .a(a4),   .b(a5),   .y(b3));
  bs_adder #(.W(W), .DA(D_B1), .DB(D_B2), .KA(KA[N_C1]), .KB(KB[N_C1]), .SUB(SUB[N_C1]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_C1)))
    u_c1 (.clk, .rst_n, .cnt, .a(b1),   .b(b2),   .y(c1));
  bs_adder #(.W(W), .DA(D_C1), .DB(D_B3), .KA(KA[N_R]),  .KB(KB[N_R]),  .SUB(SUB[N_R]),
             .REG_OUT(node_reg(ADDER_DEPTH, N_R)))
    u_r  (.clk, .rst_n, .cnt, .a(c1),   .b(b3),   .y(root));

endmodule
