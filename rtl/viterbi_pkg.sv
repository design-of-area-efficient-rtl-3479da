// viterbi_pkg -- constants and trellis helpers shared by the Viterbi decoder blocks.
//
// The decoder handles a rate 1/2, constraint-length 7 (64-state) convolutional code with
// 3-bit soft inputs, 4-bit branch metrics and 8-bit path metrics. Constraint length, state
// count and the metric widths follow the published design; the generator polynomials of the
// 64-state code (171/133 octal, the common industry pair) are this design's choice.
//
// Trellis convention used everywhere:
//   * a state is the last K-1 message bits, the newest in bit 0;
//   * with message bit u, state s moves to s' = {s[K-3:0], u};
//   * the two predecessors of s' are {d, s'[K-2:1]} for decision bit d = 0 or 1;
//   * the encoder window of that transition is {d, s'} (bit 0 = newest bit), and a generator
//     taps window bit i with generator bit K-1-i (generator MSB = newest bit).
package viterbi_pkg;

  localparam int K       = 7;             // constraint length
  localparam int NSTATE  = 1 << (K - 1);  // 64 trellis states
  localparam int SW      = K - 1;         // state index width
  localparam int SOFT_W  = 3;             // soft input width
  localparam int BM_W    = 4;             // branch metric width
  localparam int PM_W    = 8;             // path metric width
  localparam logic [K-1:0] G0 = 7'o171;   // generator of the first code bit (V1)
  localparam logic [K-1:0] G1 = 7'o133;   // generator of the second code bit (V2)

  typedef logic [BM_W-1:0] bm_t;
  typedef logic [PM_W-1:0] pm_t;
  typedef logic [SW-1:0]   state_t;

  // Parity of the taps of generator g over an encoder window (bit 0 = newest bit).
  function automatic logic gen_bit(input logic [K-1:0] win, input logic [K-1:0] g);
    logic p;
    p = 1'b0;
    for (int i = 0; i < K; i++) p ^= win[i] & g[K-1-i];
    return p;
  endfunction

  // Code symbol {V1, V2} on the branch into state s' from its predecessor with decision d.
  function automatic logic [1:0] branch_sym(input state_t s_next, input logic d);
    logic [K-1:0] win;
    win = {d, s_next};
    return {gen_bit(win, G0), gen_bit(win, G1)};
  endfunction

  // Predecessor of state s' for decision bit d.
  function automatic state_t pred_state(input state_t s_next, input logic d);
    return {d, s_next[SW-1:1]};
  endfunction

endpackage
