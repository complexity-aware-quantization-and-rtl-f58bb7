// fir_pkg: constants shared by the word-level and the bit-serial realisation
// of the example multiplierless 4-tap FIR filter.
//
// The filter computes y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2] + h3*x[n-3] with
// the 8-bit two's complement fractional coefficients
//   h0 = 0.0111011 =  59/128   h1 = 0.0101110 =  46/128
//   h2 = 1.0110011 = -77/128   h3 = 0.0100110 =  38/128.
// After common subexpression elimination the products become a synchronous
// dataflow graph (SDFG) of 12 shift-add nodes:
//   subexpression generator  s0 = x0 + x2 (shared by h0 and h2)
//                            t  = s0 + s0>>1 (the bit pair 11 inside s0's rows)
//   summation tree over the 11 remaining nonzero terms
//     -x2, t>>2, x1>>2, x3>>2, x0>>4, x1>>4, t>>6, x1>>5, x3>>5, x1>>6, x3>>6
// Every edge carries a value that lies in [-1,1) (no overflow inside the tree);
// the per-edge right shifts below are the result of the peak-estimation-vector
// (PEV) analysis, which pushes shifts toward the root as far as overflow allows.
// Node (PEV of its output [max magnitude, radix point]) = a>>KA  +/-  b>>KB:
//   S0 [1     -1] = x0>>1 + x2>>1          T  [0.75  -2] = s0>>1 + s0>>2
//   A1 [1      5] = x1>>1 + x3>>1  (x1>>6 + x3>>6)
//   A2 [1      4] = x1>>1 + x3>>1  (x1>>5 + x3>>5)
//   A3 [1      3] = x0>>1 + x1>>1  (x0>>4 + x1>>4)
//   A4 [1      1] = x1>>1 + x3>>1  (x1>>2 + x3>>2)
//   A5 [0.875 -1] = t>>1  - x2>>1  (t>>2 - x2)
//   B1 [0.75   3] = a1>>2 + a2>>1      B2 [0.6875 2] = a3>>1 + t>>2
//   B3 [0.5625 -2] = a4>>3 + a5>>1     C1 [0.53  1] = b1>>2 + b2>>1
//   R  [0.63  -2] = c1>>3 + b3
// The root value is y/4, so the output stage shifts left by OUT_SHIFT = 2 and
// saturates. The coefficient set and the graph follow the worked example of the
// method; which terms share a first-level adder is this design's choice made by
// the stated rule (terms with similar shifts on neighbouring leaves).
package fir_pkg;

  parameter int TAPS      = 4;
  parameter int W_IN      = 16;   // input data wordlength (fraction, sign + 15 bits)
  parameter int COEF_FRAC = 7;    // fractional bits of the coefficients
  parameter int OUT_SHIFT = 2;    // left shift after the root (its radix point is -2)

  // Reference coefficients, in units of 2^-COEF_FRAC, for testbenches and docs.
  parameter int COEF [TAPS] = '{59, 46, -77, 38};

  // SDFG nodes, in topological order.
  typedef enum int {N_S0, N_T, N_A1, N_A2, N_A3, N_A4, N_A5,
                    N_B1, N_B2, N_B3, N_C1, N_R, N_NODES} node_e;

  // Right shift on input a, on input b, and whether b is subtracted.
  parameter int KA  [N_NODES] = '{1, 1, 1, 1, 1, 1, 1, 2, 1, 3, 2, 3};
  parameter int KB  [N_NODES] = '{1, 2, 1, 1, 1, 1, 1, 1, 2, 1, 1, 0};
  parameter bit SUB [N_NODES] = '{0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0};

  function automatic int max2(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  // Fractional bits of a full-precision adder output whose inputs carry fa and
  // fb fractional bits and are shifted right by ka and kb. No integer growth:
  // the PEV analysis guarantees every sum stays in [-1,1).
  function automatic int add_frac(input int fa, input int ka, input int fb, input int kb);
    return max2(fa + ka, fb + kb);
  endfunction

  // Sources of each node's inputs: 0 .. TAPS-1 are the taps x[n-k],
  // TAPS + j is the output of node j.
  parameter int SRC_A [N_NODES] = '{0, 4, 1, 1, 0, 1, 5, 6, 8,  9, 11, 14};
  parameter int SRC_B [N_NODES] = '{2, 4, 3, 3, 1, 3, 2, 7, 5, 10, 12, 13};

  // Fractional bits of node n's output for an input with fx fractional bits.
  function automatic int node_frac(input int fx, input node_e n);
    int f [TAPS + N_NODES];
    for (int k = 0; k < TAPS; k++) f[k] = fx;
    for (int j = 0; j < N_NODES; j++)
      f[TAPS + j] = add_frac(f[SRC_A[j]], KA[j], f[SRC_B[j]], KB[j]);
    return f[TAPS + n];
  endfunction

  // Whether bit-serial node n registers its sum bit, for a bound of `depth`
  // full adders on any combinational path: a node registers when the chain
  // of unregistered adders ending in it reaches the bound.
  function automatic bit node_reg(input int depth, input node_e n);
    int lv [TAPS + N_NODES];
    bit r  [N_NODES];
    for (int k = 0; k < TAPS; k++) lv[k] = 0;
    for (int j = 0; j < N_NODES; j++) begin
      lv[TAPS + j] = max2(lv[SRC_A[j]], lv[SRC_B[j]]) + 1;
      r[j] = (lv[TAPS + j] >= depth);
      if (r[j]) lv[TAPS + j] = 0;
    end
    return r[n];
  endfunction

  // Timing offset of bit-serial node n's output when all taps arrive with
  // offset dx, accumulated along the graph from the inputs.
  function automatic int node_offset(input int dx, input int depth, input node_e n);
    int d [TAPS + N_NODES];
    for (int k = 0; k < TAPS; k++) d[k] = dx;
    for (int j = 0; j < N_NODES; j++)
      d[TAPS + j] = max2(d[SRC_A[j]] + KA[j], d[SRC_B[j]] + KB[j])
                  + int'(node_reg(depth, node_e'(j)));
    return d[TAPS + n];
  endfunction

endpackage
