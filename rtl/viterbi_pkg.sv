// viterbi_pkg: constants and token types shared by the rate-1/2, K=3 Viterbi
// encoder/decoder pair.
//
// The code is the (2,1,3) convolutional code with generators V1 = u^D0^D1 and
// V2 = u^D1. The encoder state is written {D1,D0}: D0 holds the newest past
// input and D1 the one before it, so state S = 2*D1 + D0 and an input u moves
// state {D1,D0} to {D0,u}. With this numbering the two state bits are the last
// two information bits in time order, which is what the hybrid register
// exchange survivor memory appends to a state's register.
//
// Soft symbols are signed 3-bit numbers in -3..+3: a code bit 0 is sent as -3
// and a code bit 1 as +3. Branch metrics are 5-bit two's complement numbers.
// The token structs below are the data of the 4-phase bundled-data channels
// between the pipeline stages.
package viterbi_pkg;

  localparam int K         = 3;            // constraint length
  localparam int M         = K - 1;        // encoder memory, also the HREM pretraceback depth
  localparam int N_STATES  = 1 << M;       // trellis states
  localparam int SOFT_W    = 3;            // soft symbol width (-3..+3)
  localparam int SOFT_MAX  = 3;            // soft level of a code bit
  localparam int BM_W      = 5;            // branch metric width
  localparam int BM_MAX    = 2 * SOFT_MAX; // largest |branch metric|
  localparam int FRAME_LEN_DEF = 12;          // decoded bits per frame (dec_out(11:0))

  typedef logic        [M-1:0]      state_t;
  typedef logic signed [SOFT_W-1:0] soft_t;
  typedef logic signed [BM_W-1:0]   bm_t;
  localparam int NOISE_W = 4;              // channel perturbation width (-8..+7)
  typedef logic signed [NOISE_W-1:0] noise_t;

  // Source token: one information bit plus the channel perturbation that the
  // soft mapper adds to the two soft symbols of that bit.
  typedef struct packed {
    logic   data;
    noise_t n0;
    noise_t n1;
  } src_tok_t;

  // Encoder output token: the two code bits and the perturbation carried along.
  typedef struct packed {
    logic   v1;
    logic   v2;
    noise_t n0;
    noise_t n1;
  } enc_tok_t;

  // Received soft symbol pair (i0 belongs to V1, i1 to V2).
  typedef struct packed {
    soft_t i0;
    soft_t i1;
  } sym_t;

  // Branch metrics indexed by the expected code pair {V1,V2}.
  typedef bm_t [N_STATES-1:0] bm_vec_t;

  // ACSU output token: one survivor decision per state, the best state after
  // this step and the end-of-frame flag.
  typedef struct packed {
    logic [N_STATES-1:0] dec;
    state_t              best;
    logic                last;
  } acs_tok_t;

  // Expected code pair {V1,V2} of the branch that leaves state {x,a} with input b.
  function automatic logic [1:0] branch_code(input logic x, input logic a, input logic b);
    return {b ^ a ^ x, b ^ x};
  endfunction

  // Path metrics. A frame starts in S0: S0 begins at 0 and the other states at
  // pm_init_high(), which exceeds every metric a path from S0 can reach in a
  // frame (at most BM_MAX per step), so paths that start elsewhere never win.
  // pm_width() gives a signed width that holds every metric of such a frame.
  function automatic int pm_init_high(input int frame_len);
    return 2 * BM_MAX * frame_len;
  endfunction

  function automatic int pm_width(input int frame_len);
    return $clog2(3 * BM_MAX * frame_len + 1) + 1;
  endfunction

endpackage
