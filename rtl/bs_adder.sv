// bs_adder: bit-serial adder/subtractor with shifted inputs,
//   y = (a >>> KA) + (b >>> KB)   or, with SUB = 1,   (a >>> KA) - (b >>> KB),
// on W-bit two's complement words sent LSB first.
// Timing convention: an input with offset D presents bit i of its word in the
// cycle where the frame counter equals (i + D) mod W. Bit i of a >>> KA is bit
// i+KA of a, so the shifted operand is ready KA cycles later (offset DA+KA);
// for its top KA bits the sign of a is repeated from a hold register
// (sign extension). The operand that is ready first is delayed in a short
// shift register until both line up at offset E = max(DA+KA, DB+KB), so a
// shift of k costs k cycles of latency. A single full adder with a carry
// flip-flop then adds the aligned bits; at bit 0 the carry-in is forced to 0
// (add) or 1 (subtract, b inverted). With REG_OUT = 1 the sum bit is
// registered and y has offset E+1; with REG_OUT = 0 y is the combinational
// sum bit with offset E, so several adders can be chained in one cycle (the
// enclosing graph bounds the length of such chains, see fir_pkg::node_reg). Bits shifted out below the LSB are lost,
// so W must cover the full precision of the graph.
// Zero reset response: data flip-flops hold non-inverted bits and reset to
// zero, the inversion of b is applied after them, and the carry flip-flop of
// a subtractor resets to 1 (the steady carry of a - 0 = a + ~0 + 1), so a
// node fed with zeros outputs zeros from the first cycle after reset.
// The latencies are derived at elaboration time from the input offsets,
// which takes the place of the retiming of the slowed-down word-level graph.
module bs_adder #(
  parameter int W   = 25,
  parameter int DA  = 0,
  parameter int DB  = 0,
  parameter int KA  = 0,
  parameter int KB  = 3,
  parameter bit SUB = 1'b1,
  parameter bit REG_OUT = 1'b1,
  localparam int CW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] cnt,
  input  logic          a,
  input  logic          b,
  output logic          y
);

  localparam int E   = fir_pkg::max2(DA + KA, DB + KB);
  localparam int DLA = E - (DA + KA);
  localparam int DLB = E - (DB + KB);
  localparam int PA  = (DA + DLA) % W;   // position of bit 0 of the delayed a
  localparam int PB  = (DB + DLB) % W;
  localparam int PE  = E % W;            // position of bit 0 of the aligned sum

  logic a_d, b_d;           // inputs after the alignment delay
  logic hold_a, hold_b;     // sign bits of the current words
  logic op_a, op_b;         // aligned, shifted, sign-extended operands
  logic carry, cin, s, s_q;
  logic [CW:0] ja, jb, jo;  // bit indices of the delayed inputs and of the sum

  // Bit index, within its word, of the bit seen at position c of a stream
  // whose bit 0 is at position p: (c - p) mod W.
  function automatic logic [CW:0] bit_index(input logic [CW-1:0] c, input int p);
    logic [CW:0] cc, pp;
    cc = {1'b0, c};
    pp = (CW+1)'(p);
    return (cc >= pp) ? cc - pp : cc + (CW+1)'(W) - pp;
  endfunction

  // Alignment delays.
  if (DLA > 0) begin : g_dla
    logic [DLA-1:0] sr;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) sr <= '0;
      else        sr <= DLA'({sr, a});
    assign a_d = sr[DLA-1];
  end else begin : g_noa
    assign a_d = a;
  end

  if (DLB > 0) begin : g_dlb
    logic [DLB-1:0] sr;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) sr <= '0;
      else        sr <= DLB'({sr, b});
    assign b_d = sr[DLB-1];
  end else begin : g_nob
    assign b_d = b;
  end

  always_comb begin
    ja = bit_index(cnt, PA);
    jb = bit_index(cnt, PB);
    jo = bit_index(cnt, PE);
    // Raw indices below K belong to the next word: repeat the held sign.
    op_a = (ja < (CW+1)'(KA)) ? hold_a : a_d;
    op_b = (jb < (CW+1)'(KB)) ? hold_b : b_d;
    if (SUB) op_b = ~op_b;
    cin  = (jo == '0) ? SUB : carry;
    s    = op_a ^ op_b ^ cin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_a <= 1'b0;
      hold_b <= 1'b0;
      carry  <= SUB;
      s_q    <= 1'b0;
    end else begin
      if (ja == (CW+1)'(W - 1)) hold_a <= a_d;
      if (jb == (CW+1)'(W - 1)) hold_b <= b_d;
      carry <= (op_a & op_b) | (op_a & cin) | (op_b & cin);
      s_q   <= s;
    end
  end

  assign y = REG_OUT ? s_q : s;

  initial begin
    assert (KA < W && KB < W) else $error("bs_adder: shift must be below the word length");
  end

endmodule
