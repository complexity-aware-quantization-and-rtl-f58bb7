// tap_delay_line: the delay line of a direct-form FIR filter.
// taps[0] is the input itself, taps[k] the input delayed by k*STAGE_LEN
// enabled clock cycles. With W = data width and STAGE_LEN = 1 it is the
// word-level delay line x[n] .. x[n-TAPS+1], advanced by en once per sample.
// With W = 1 and STAGE_LEN = w it is the delay line of a bit-serial filter:
// each z^-1 becomes w cascaded flip-flops, so taps[k] carries word n-k while
// taps[0] carries word n, bit for bit in the same cycle. All flip-flops reset
// to zero (zero initial state of the filter).
module tap_delay_line #(
  parameter int W         = 16,
  parameter int TAPS      = 4,
  parameter int STAGE_LEN = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] taps [TAPS]
);

  localparam int DEPTH = (TAPS - 1) * STAGE_LEN;

  logic [W-1:0] sr [DEPTH];   // sr[0] is the newest element

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    taps[0] = din;
    for (int k = 1; k < TAPS; k++) taps[k] = sr[k*STAGE_LEN - 1];
  end

endmodule
