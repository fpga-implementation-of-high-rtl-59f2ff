// viterbi_pkg: constants and helper functions shared by the rate-1/2
// convolutional encoder and the hard-decision Viterbi decoder.
//
// Code: constraint length K = 9, rate 1/2 (both from the design description).
// The generator polynomials are not specified by the design description; the
// defaults are the widely used K = 9 pair 753/561 (octal), an own choice.
//
// Bit conventions used everywhere in this design:
//   * A trellis state holds the last K-1 input bits, the newest in the MSB.
//     Input b in state s leads to state {b, s[K-2:1]}.
//   * The encoder register seen by the generators is u = {b, s}: bit K-1 of a
//     generator taps the current input, bit 0 the oldest stored bit.
//   * A code symbol is {c0, c1}, c0 from G0 in bit 1 (sent first).
package viterbi_pkg;

  localparam int unsigned DEF_K         = 9;
  localparam int unsigned DEF_G0        = 'o753;
  localparam int unsigned DEF_G1        = 'o561;
  // Trellis stages per frame (data bits plus K-1 zero tail bits).
  localparam int unsigned DEF_FRAME_LEN = 128;
  // Path metric width; metrics are compared modulo 2^PM_W.
  localparam int unsigned DEF_PM_W      = 8;

  typedef logic [1:0] symbol_t;

  // Code symbol produced for encoder register contents u (K bits, see above).
  function automatic symbol_t code_symbol(input int unsigned u,
                                          input int unsigned g0,
                                          input int unsigned g1);
    return {^(u & g0) , ^(u & g1)};
  endfunction

endpackage
