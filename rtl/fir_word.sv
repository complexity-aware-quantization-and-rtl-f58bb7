// fir_word: word-level (bit-parallel) realisation of the example 4-tap
// multiplierless FIR filter, y[n] = sum h_k x[n-k] with h = {59,46,-77,38}/128.
// A sample x[n] is accepted in every cycle where in_valid is high: the
// combinational shift-add graph (sa_adder_tree, 12 adders, no multipliers)
// forms y[n]/4 from x[n] and the three stored samples, out_saturate scales it
// back and saturates, and the result is registered. y_valid rises one cycle
// after in_valid (latency 1, throughput one sample per cycle).
// sat_pos / sat_neg are registered with y and report a saturated output.
// Inputs and outputs are two's complement fractions (sign + W-1 bits);
// W_OUT = 16 with truncation is this design's choice; W_OUT = W+7 gives the
// exact full-precision result.
module fir_word
  import fir_pkg::*;
#(
  parameter int W     = W_IN,
  parameter int W_OUT = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     x_in,
  output logic                    y_valid,
  output logic signed [W_OUT-1:0] y,
  output logic                    sat_pos,
  output logic                    sat_neg
);

  localparam int FR = node_frac(W - 1, N_R);

  logic        [W-1:0]     taps_u [TAPS];
  logic signed [W-1:0]     taps   [TAPS];
  logic signed [FR:0]      root;
  logic signed [W_OUT-1:0] y_c;
  logic                    sp_c, sn_c;

  tap_delay_line #(.W(W), .TAPS(TAPS), .STAGE_LEN(1)) u_dl (
    .clk, .rst_n, .en(in_valid), .din(x_in), .taps(taps_u));

  always_comb for (int k = 0; k < TAPS; k++) taps[k] = signed'(taps_u[k]);

  sa_adder_tree #(.W(W)) u_tree (.x(taps), .root(root));

  out_saturate #(.FI(FR), .SH(OUT_SHIFT), .W_OUT(W_OUT)) u_sat (
    .v(root), .y(y_c), .sat_pos(sp_c), .sat_neg(sn_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
      sat_pos <= 1'b0;
      sat_neg <= 1'b0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        y       <= y_c;
        sat_pos <= sp_c;
        sat_neg <= sn_c;
      end
    end
  end

endmodule
