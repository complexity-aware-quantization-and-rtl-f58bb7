// sp_sat: serial-to-parallel converter with saturation logic.
// The serial input carries W-bit words LSB first with offset D (bit i in the
// cycle where the frame counter equals (i + D) mod W). Bits are shifted into
// a W-bit register; in the cycle that brings bit W-1 the complete word is
// passed through out_saturate (left shift by SH, saturation to [-1,1),
// truncation to W_OUT bits) and registered, and y_valid pulses for one cycle
// with the new y. sat_pos / sat_neg are registered with y.
module sp_sat #(
  parameter int W     = 25,
  parameter int D     = 0,
  parameter int SH    = 2,
  parameter int W_OUT = 16,
  localparam int CW   = (W > 1) ? $clog2(W) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [CW-1:0]           cnt,
  input  logic                    sin,
  output logic                    y_valid,
  output logic signed [W_OUT-1:0] y,
  output logic                    sat_pos,
  output logic                    sat_neg
);

  localparam int PLAST = (D + W - 1) % W;   // position of the sign bit

  logic [W-2:0]            sr;
  logic signed [W-1:0]     word;
  logic signed [W_OUT-1:0] y_c;
  logic                    sp_c, sn_c, last;

  assign word = {sin, sr};
  assign last = (cnt == CW'(PLAST));

  out_saturate #(.FI(W - 1), .SH(SH), .W_OUT(W_OUT)) u_sat (
    .v(word), .y(y_c), .sat_pos(sp_c), .sat_neg(sn_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= '0;
      y_valid <= 1'b0;
      y       <= '0;
      sat_pos <= 1'b0;
      sat_neg <= 1'b0;
    end else begin
      sr      <= word[W-1:1];
      y_valid <= last;
      if (last) begin
        y       <= y_c;
        sat_pos <= sp_c;
        sat_neg <= sn_c;
      end
    end
  end

endmodule
