// bs_frame_ctrl: bit-position counter of the bit-serial filter.
// A bit-serial word of W bits occupies W consecutive cycles, LSB first, so all
// operations are W-cyclic. The counter runs 0 .. W-1 and wraps; frame_start is
// high while it is 0, which is the cycle in which the parallel-to-serial
// converter loads a new sample. Each bit-serial adder decodes its own
// carry-in and sign-extension controls from this count, using the latency of
// its inputs worked out at elaboration time (see bs_adder).
module bs_frame_ctrl #(
  parameter int W   = 25,
  localparam int CW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] cnt,
  output logic          frame_start
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (cnt == CW'(W - 1))  cnt <= '0;
    else                         cnt <= cnt + 1'b1;
  end

  assign frame_start = (cnt == '0);

endmodule
