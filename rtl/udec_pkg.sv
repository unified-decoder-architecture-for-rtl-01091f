// udec_pkg: constants, types and functions shared by the unified LDPC/turbo
// decoder.
//
// Fixed-point data uses a q:2 format (two fractional bits, so one LSB is 0.25).
// Channel values are 6 bits, a-priori values 7 bits, branch metrics 8 bits and
// alpha/beta state metrics 10 bits, as in the datapath of the SISO engine.
// LLRs follow the convention L = log P(0)/P(1), under which the LDPC
// check-node function f(a,b) = log((1+e^a e^b)/(e^a+e^b)) holds.
//
// The turbo trellis is the 8-state recursive systematic code of 3GPP LTE
// (feedback 1+D^2+D^3, parity 1+D+D^3); this choice of code is this design's,
// the architecture only requires an 8-state code. A state index is
// {s1,s2,s3} with s1 the most recent register bit.
package udec_pkg;

  localparam int unsigned QW    = 6;   // channel LLR width (6:2)
  localparam int unsigned LAW   = 7;   // a-priori / extrinsic width
  localparam int unsigned GW    = 8;   // branch metric width
  localparam int unsigned SMW   = 10;  // state metric width
  localparam int unsigned NLANE = 8;   // FACS units per alpha/beta/Lambda unit
  localparam int unsigned NST   = 8;   // turbo trellis states

  typedef logic signed [QW-1:0]  chan_t;
  typedef logic signed [LAW-1:0] apri_t;
  typedef logic signed [GW-1:0]  gam_t;
  typedef logic signed [SMW-1:0] sm_t;

  // LDPC "+infinity": the largest positive state metric.
  localparam sm_t SM_INF = sm_t'((1 << (SMW - 1)) - 1);
  // Turbo "minus infinity" used for the unknown states at a block start.
  localparam sm_t SM_NEG = sm_t'(-(1 << (SMW - 3)));

  // g(x) = log(1+exp(-x)) for a non-negative q:2 magnitude, in q:2 units:
  // |x| = 0 -> 3, 1..3 -> 2, 4..8 -> 1, above 8 -> 0.
  function automatic logic [1:0] g_of(input int mag);
    if (mag == 0)      return 2'd3;
    else if (mag <= 3) return 2'd2;
    else if (mag <= 8) return 2'd1;
    else               return 2'd0;
  endfunction

  // RSC encoder: next state and parity bit for input bit u from state s.
  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];          // feedback 1 + D^2 + D^3
    return {a, s[2], s[1]};
  endfunction

  function automatic logic rsc_par(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];       // parity 1 + D + D^3
  endfunction

  // Predecessor k (0/1) of state n, and the input bit on that branch.
  // (the register contents shift, so the predecessor is {n[1], n[0], k}).
  function automatic logic [2:0] rsc_prev(input logic [1:0] n_low, input logic k);
    return {n_low, k};
  endfunction

  // Input bit on that branch: u = a ^ s2 ^ s3 with a = n[2], s2 = n[0], s3 = k.
  function automatic logic rsc_prev_u(input logic n_msb, input logic n_lsb, input logic k);
    return n_msb ^ n_lsb ^ k;
  endfunction

endpackage
