// sova_pkg: word lengths, trellis constants and trellis functions shared by the
// blocks of the soft-output Viterbi (SOVA) decoder.
//
// The decoder is built for the 16-state recursive systematic convolutional (RSC)
// code with generator polynomials g = (37, 21) in octal, the component code of
// the turbo code the design targets: feedback 37 = 1+D+D^2+D^3+D^4, feed-forward
// 21 = 1+D^4. The word lengths (4-bit channel inputs, 5-bit systematic+extrinsic
// input, 10-bit internal results, 4-bit extrinsic output) and the truncation path
// length of 50 are the values chosen for the design. Both polynomials are
// palindromes, so the bit order of the octal numbers does not matter.
//
// State encoding (this design's choice): state = {a[k-1], a[k-2], a[k-3], a[k-4]},
// where a[k] = u[k] ^ a[k-1] ^ a[k-2] ^ a[k-3] ^ a[k-4] is the feedback register
// input and the parity is p[k] = a[k] ^ a[k-4]. The next state is {a[k], state[3:1]}.
// A state s' therefore has the two predecessors {s'[2:0], b}, b = 0/1, and the
// branches from them always carry opposite information bits, so the survivor and
// the competing path differ in their newest hard decision.
package sova_pkg;

  localparam int unsigned MEM       = 4;              // encoder memory
  localparam int unsigned N_STATES  = 1 << MEM;       // 16 trellis states
  localparam int unsigned W_SNR     = 4;              // channel state estimate
  localparam int unsigned W_Y       = 4;              // received parity symbol
  localparam int unsigned W_XE      = 5;              // systematic + extrinsic
  localparam int unsigned W_INT     = 10;             // path metrics, deltas, soft values
  localparam int unsigned W_OUT     = 4;              // extrinsic information output
  localparam int unsigned TRUNC_LEN = 50;             // truncation path length
  localparam int unsigned SNR_FRAC  = 2;              // fractional bits of the SNR weight
  localparam int unsigned W_BM      = 8;              // branch metric width

  typedef logic [MEM-1:0]               state_t;
  typedef logic signed [W_INT-1:0]      metric_t;     // normalised path metric (<= 0)
  typedef logic [W_INT-1:0]             soft_t;       // delta / reliability (>= 0)
  typedef logic signed [W_BM-1:0]       bm_t;

  localparam metric_t METRIC_MIN = metric_t'(-(2 ** (W_INT - 1)));
  localparam soft_t   SOFT_MAX   = '1;

  // Predecessor of state s' along the branch whose oldest register bit is b.
  function automatic state_t pred_state(input state_t s_next, input logic b);
    return {s_next[MEM-2:0], b};
  endfunction

  // Information bit on the branch from pred_state(s_next, b) to s_next.
  function automatic logic branch_info(input state_t s_next, input logic b);
    return s_next[MEM-1] ^ (^s_next[MEM-2:0]) ^ b;
  endfunction

  // Parity bit on the branch from pred_state(s_next, b) to s_next.
  function automatic logic branch_parity(input state_t s_next, input logic b);
    return s_next[MEM-1] ^ b;
  endfunction

  // Oldest-bit selector b of the surviving branch into s_next, recovered from
  // its information bit u (the inverse of branch_info).
  function automatic logic surv_sel(input state_t s_next, input logic u);
    return s_next[MEM-1] ^ (^s_next[MEM-2:0]) ^ u;
  endfunction

  // Encoder step: next state and parity for state s and information bit u.
  function automatic state_t enc_next(input state_t s, input logic u);
    logic a;
    a = u ^ (^s);
    return {a, s[MEM-1:1]};
  endfunction

  function automatic logic enc_parity(input state_t s, input logic u);
    logic a;
    a = u ^ (^s);
    return a ^ s[0];
  endfunction

endpackage
