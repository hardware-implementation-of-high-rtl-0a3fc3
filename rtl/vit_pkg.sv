// vit_pkg -- constants and helper functions shared by the Viterbi decoder
// and its self-test set-up.
//
// The code is the constraint-length 7, rate-1/2 convolutional code with
// generator polynomials 171 and 133 (octal), the code flown on Voyager.
// A frame is L = 30 trellis stages. The last M = 6 stages carry zero tail
// ("reset") bits that bring the encoder back to state 0, so each frame
// carries L - M = 24 data bits. Code, frame length and the six unstored
// stages come from the design description. The bit ordering is this
// design's own choice:
//   * state s[5:0] holds the last six inputs, newest in s[0]; an input u
//     moves the encoder from s to {s[4:0], u};
//   * the 7-bit encoder register is r = {s, u}, so r[0] is the current
//     input and r[k] the input k steps back; polynomial bit (6-k) is the
//     tap on r[k] (the most significant polynomial bit taps the current
//     input);
//   * the transmitted symbol is {c0, c1}: bit 1 from 171, bit 0 from 133.
package vit_pkg;

  localparam int unsigned K      = 7;          // constraint length
  localparam int unsigned M      = K - 1;      // encoder flip-flops
  localparam int unsigned NS     = 1 << M;     // trellis states (64)
  localparam int unsigned L      = 30;         // trellis stages per frame
  localparam int unsigned NDATA  = L - M;      // data bits per frame (24)
  localparam int unsigned NREG   = L - M;      // stored survivor registers (24)
  localparam int unsigned TB_CYC = M;          // clock cycles given to trace back
  localparam int unsigned PMW    = 8;          // path-metric width
  localparam int unsigned BMW    = 2;          // branch-metric width

  localparam logic [K-1:0] G0 = 7'o171;
  localparam logic [K-1:0] G1 = 7'o133;

  // Start value of every state but S00: larger than any reachable metric
  // (at most 2*L = 60), small enough that 6 more stages cannot overflow.
  localparam logic [PMW-1:0] PM_INF = 8'd128;

  typedef logic [M-1:0]   state_t;
  typedef logic [1:0]     sym_t;
  typedef logic [PMW-1:0] pm_t;
  typedef logic [BMW-1:0] bm_t;

  // Parity of the encoder register masked with a polynomial, taps reversed
  // so that polynomial bit (K-1-k) meets r[k].
  function automatic logic parity_tap(logic [K-1:0] r, logic [K-1:0] g);
    logic p;
    p = 1'b0;
    for (int k = 0; k < int'(K); k++) p ^= r[k] & g[K-1-k];
    return p;
  endfunction

  // Code symbol sent for encoder register r = {previous state, input}.
  function automatic sym_t encode_sym(logic [K-1:0] r);
    return {parity_tap(r, G0), parity_tap(r, G1)};
  endfunction

endpackage
