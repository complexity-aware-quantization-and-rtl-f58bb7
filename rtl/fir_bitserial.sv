// fir_bitserial: bit-serial realisation of the example 4-tap multiplierless
// FIR filter, bit-true to fir_word.
// Structure: parallel-to-serial converter, serial delay line (each z^-1 is W
// flip-flops), bit-serial adder tree, serial-to-parallel converter with
// saturation. One sample is taken per frame of W cycles: x_in is captured in
// the cycle where sample_take is high (frame start), so the source must hold
// a new sample there in every frame. The frame length W defaults to the
// full-precision word length of the graph, sign + (W_IN-1) + 9 = 25 bits, so
// no bit is lost to the shifts and the result equals the word-level one.
// ADDER_DEPTH bounds the full adders on a combinational path in the adder
// tree (5 by default, as for the evaluated bit-serial filters; 1 registers
// every adder for the shortest clock period).
// Latency: y_valid pulses W + DR - DX + 1 cycles after the sample_take cycle,
// DR being the root offset of bs_adder_tree: 36 cycles for W_IN = 16 and
// depth 5, 40 for depth 1. Throughput one sample per W cycles. The saturation flags are reported as in fir_word.
module fir_bitserial
  import fir_pkg::*;
#(
  parameter int W_X   = W_IN,
  parameter int W     = node_frac(W_X - 1, N_R) + 1,
  parameter int W_OUT = 16,
  parameter int ADDER_DEPTH = 5,
  localparam int CW   = (W > 1) ? $clog2(W) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [W_X-1:0]   x_in,
  output logic                    sample_take,
  output logic                    y_valid,
  output logic signed [W_OUT-1:0] y,
  output logic                    sat_pos,
  output logic                    sat_neg
);

  localparam int DX = 1;                       // offset of the P/S output
  localparam int DR = node_offset(DX, ADDER_DEPTH, N_R);    // offset of the root

  logic [CW-1:0] cnt;
  logic          xs;
  logic [0:0]    taps_v [TAPS];
  logic          taps   [TAPS];
  logic          root;

  bs_frame_ctrl #(.W(W)) u_ctrl (.clk, .rst_n, .cnt, .frame_start(sample_take));

  ps_conv #(.W_IN(W_X), .W(W)) u_ps (
    .clk, .rst_n, .load(sample_take), .din(x_in), .sout(xs));

  tap_delay_line #(.W(1), .TAPS(TAPS), .STAGE_LEN(W)) u_dl (
    .clk, .rst_n, .en(1'b1), .din(xs), .taps(taps_v));

  always_comb for (int k = 0; k < TAPS; k++) taps[k] = taps_v[k][0];

  bs_adder_tree #(.W(W), .DX(DX), .ADDER_DEPTH(ADDER_DEPTH)) u_tree (.clk, .rst_n, .cnt, .x(taps), .root(root));

  sp_sat #(.W(W), .D(DR), .SH(OUT_SHIFT), .W_OUT(W_OUT)) u_sp (
    .clk, .rst_n, .cnt, .sin(root), .y_valid, .y, .sat_pos, .sat_neg);

endmodule
