// vit_pkg: constants and helper functions shared by the IS-95 reverse-link
// convolutional encoder and the modified-register-exchange (MRE) Viterbi
// decoder.
//
// Code: rate 1/3, constraint length K = 9 (256 trellis states), generator
// polynomials 577, 663, 711 (octal), 3-bit soft-decision inputs, 10-bit path
// metrics and a survivor (trace-forward) depth of L = 5K = 45. These numbers
// are the ones the design targets; the soft-symbol coding, the branch-metric
// formula and the state numbering below are this implementation's choices.
//
// State numbering: a state holds the last K-1 input bits with the most
// recent bit in bit 0, so the successor of state s on input u is
// {s[K-3:0], u}. The encoder's register vector for a transition is
// v = {s, u}: v[0] is the current input, v[i] the input i steps ago. The most
// significant bit of an octal generator taps v[0], its least significant
// bit taps v[K-1].
//
// Soft symbols: each code bit arrives as a 3-bit offset-binary value,
// 0 = confident '0' ... 7 = confident '1'. A received symbol packs the three
// values as {c2, c1, c0}.
package vit_pkg;

  localparam int K    = 9;            // constraint length
  localparam int N    = 3;            // code bits per information bit
  localparam int Q    = 3;            // soft-decision bits per code bit
  localparam int SW   = K - 1;        // state width
  localparam int NS   = 1 << SW;      // number of states (256)
  localparam int L    = 5 * K;        // survivor path / trace-forward depth (45)
  localparam int PMW  = 10;           // path metric width
  localparam int SYMW = N * Q;        // width of one received symbol (9)
  localparam int BMW  = 5;            // branch metric width: 3 * 7 = 21 fits

  // Generator polynomials, octal, index j gives code bit Cj.
  localparam logic [N-1:0][K-1:0] GEN = {9'o711, 9'o663, 9'o577};  // [2]=C2 ... [0]=C0

endpackage
