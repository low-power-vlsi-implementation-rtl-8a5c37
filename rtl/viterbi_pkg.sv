// viterbi_pkg: types, constants and trellis functions shared by the
// convolutional encoder and the Viterbi decoder.
//
// The code is the rate-1/2, constraint-length-4 code with generator
// polynomials G1 = 1 + Z + Z^2 + Z^3 and G2 = 1 + Z^2 + Z^3 (constraint
// length, rate and polynomials follow the source design). A polynomial is
// stored with bit i holding the coefficient of Z^i.
//
// State convention (taken from the state diagram of the source design and
// checked against the polynomials): the 3-bit state is the contents of the
// three delay elements, s[2] = the most recent input bit (Z^1), s[1] = the one
// before (Z^2), s[0] = the oldest (Z^3). Input bit b moves the encoder from s
// to {b, s[2:1]} and emits the code symbol {c1, c2}, c1 from G1 in the upper
// bit, c2 from G2 in the lower bit.
package viterbi_pkg;

  localparam int unsigned K      = 4;            // constraint length (H)
  localparam int unsigned SW     = K - 1;        // state width
  localparam int unsigned NS     = 1 << SW;      // number of states (N = 2^(H-1))
  localparam int unsigned CW     = 2;            // code bits per input bit (rate 1/2)
  localparam logic [K-1:0] G1    = 4'b1111;      // 1 + Z + Z^2 + Z^3
  localparam logic [K-1:0] G2    = 4'b1101;      // 1 + Z^2 + Z^3
  localparam int unsigned BM_W   = 2;            // Hamming distance of a 2-bit symbol: 0..2

  typedef logic [SW-1:0]   state_t;
  typedef logic [CW-1:0]   code_t;
  typedef logic [BM_W-1:0] bm_t;

  // Code symbol emitted on the transition from s on input bit b.
  function automatic code_t branch_code(state_t s, logic b);
    logic [K-1:0] taps;
    // taps[i] = the bit delayed by i cycles
    taps = {s[0], s[1], s[2], b};
    return {^(taps & G1), ^(taps & G2)};
  endfunction

  // Hamming distance between two code symbols.
  function automatic bm_t hamming(code_t a, code_t b);
    code_t d;
    d = a ^ b;
    return bm_t'(d[1]) + bm_t'(d[0]);
  endfunction

endpackage
