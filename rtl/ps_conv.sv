// ps_conv: parallel-to-serial converter of the bit-serial filter.
// In the cycle where load is high the W_IN-bit sample is captured into a
// W-bit shift register, placed at the top of the word (sign at bit W-1) with
// W-W_IN zero bits below it, so the serial word is the same fraction with
// more fraction bits. The register then shifts right, presenting bit i of
// the word in the i+1-th cycle after load (offset 1 when load is the frame
// start). Reset clears the register.
module ps_conv #(
  parameter int W_IN = 16,
  parameter int W    = 25
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [W_IN-1:0] din,
  output logic            sout
);

  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= {din, {(W - W_IN){1'b0}}};
    else           sr <= {1'b0, sr[W-1:1]};
  end

  assign sout = sr[0];

  initial assert (W >= W_IN) else $error("ps_conv: frame shorter than the sample");

endmodule
