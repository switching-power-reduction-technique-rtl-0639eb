// turbo_pkg: shared widths, types and trellis of the turbo decoder with
// dynamic power management.
//
// The constituent code is the 8-state recursive systematic convolutional
// code of LTE (feedback polynomial 1+D^2+D^3, parity polynomial 1+D+D^3).
// The state is the three-bit shift register {r0,r1,r2}, r0 the newest bit.
// LLRs follow the convention L = ln(P(b=0)/P(b=1)): a negative LLR decides 1.
// Channel LLRs are 6 bits wide, as in the decoder the design is built for;
// extrinsic and state-metric widths are this design's own choices.
package turbo_pkg;

  localparam int LLR_W   = 6;    // channel LLR quantisation (6 bits)
  localparam int EXT_W   = 6;    // extrinsic LLR width, saturated (6-bit messages)
  localparam int SA_W    = 10;   // systematic + a-priori sum
  localparam int SM_W    = 16;   // state metric width, two's complement
  localparam int POST_W  = 18;   // posterior LLR width
  localparam int NSTATE  = 8;    // trellis states (memory 3)

  typedef logic signed [LLR_W-1:0]  llr_t;
  typedef logic signed [EXT_W-1:0]  ext_t;
  typedef logic signed [SA_W-1:0]   sa_t;
  typedef logic signed [SM_W-1:0]   sm_t;
  typedef logic signed [POST_W-1:0] post_t;
  typedef sm_t smvec_t [NSTATE];

  // Metric given to states that cannot be reached (start of the block).
  localparam sm_t SM_UNREACH = sm_t'(-(1 <<< (SM_W - 3)));

  // Why the power manager ended a decoding task.
  typedef enum logic [1:0] {
    STOP_NONE       = 2'd0,
    STOP_CONVERGED  = 2'd1,  // no hard decision changed in the last half-iteration
    STOP_UNDECODABLE= 2'd2,  // critical period too long: block judged undecodable
    STOP_DEADLINE   = 2'd3   // no further half-iteration fits before the deadline
  } stop_reason_e;

  // Next state of the RSC encoder from state s with input bit u.
  function automatic logic [2:0] trellis_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];            // s = {r0,r1,r2}: s[2]=r0, s[1]=r1, s[0]=r2
    return {a, s[2], s[1]};
  endfunction

  // Parity bit produced on the transition from state s with input bit u.
  function automatic logic trellis_par(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // Saturate a wide value to the extrinsic width.
  function automatic ext_t sat_ext(input post_t v);
    if (v > post_t'(2 ** (EXT_W - 1) - 1))
      return ext_t'(2 ** (EXT_W - 1) - 1);
    else if (v < post_t'(-(2 ** (EXT_W - 1)) + 1))
      return ext_t'(-(2 ** (EXT_W - 1)) + 1);
    else
      return ext_t'(v);
  endfunction

endpackage
