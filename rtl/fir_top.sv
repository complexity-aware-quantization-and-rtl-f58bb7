// fir_top: the example 4-tap multiplierless FIR filter in both of its
// realisations, side by side on one sample stream: fir_word (bit-parallel,
// one adder per graph node, latency 1) and fir_bitserial (one full adder per
// graph node, W cycles per sample). A sample is taken from x_in in each cycle
// where sample_take is high, i.e. once per bit-serial frame of W = 25 cycles,
// and goes to both filters. Both produce the same saturated 16-bit output:
// y_word one cycle after sample_take, y_ser 36 cycles after it (bit-serial
// adder depth 5).
module fir_top
  import fir_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] x_in,
  output logic               sample_take,
  output logic               y_word_valid,
  output logic signed [15:0] y_word,
  output logic               word_sat_pos,
  output logic               word_sat_neg,
  output logic               y_ser_valid,
  output logic signed [15:0] y_ser,
  output logic               ser_sat_pos,
  output logic               ser_sat_neg
);

  fir_word #(.W(W_IN), .W_OUT(16)) u_word (
    .clk, .rst_n, .in_valid(sample_take), .x_in,
    .y_valid(y_word_valid), .y(y_word), .sat_pos(word_sat_pos), .sat_neg(word_sat_neg));

  fir_bitserial #(.W_X(W_IN), .W_OUT(16)) u_ser (
    .clk, .rst_n, .x_in, .sample_take,
    .y_valid(y_ser_valid), .y(y_ser), .sat_pos(ser_sat_pos), .sat_neg(ser_sat_neg));

endmodule
