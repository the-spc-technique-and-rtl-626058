// spc_pkg: types, constants and small functions shared by the SPC-turbo
// encoder and decoder.
//
// Code structure (the defaults are the main configuration of the design):
//   - an information block D of N = J*K bits, J = J_E + J_F rows of K columns
//     per dimension, M = 3 dimensions, (J_E, J_F) = (2, 1), rate J/(J+M) = 1/2,
//     J*K = 65535 (K = 21845);
//   - the convolutional code C-hat is the 4-state recursive systematic code
//     (1+x)/(1+x+x^2), terminated circularly (tail-biting).
//
// Soft values.  The decoding rules are written for likelihood ratios (LR);
// the hardware keeps their natural logarithm (LLR) in fixed point, so that a
// product of LRs becomes a sum and a division a difference.  An LLR is
// LLR_W bits, two's complement, with LLR_FB fraction bits (one LSB = 0.25);
// positive means bit value 0 (BPSK +1).  Posterior LLRs are POST_W bits.
// Path metrics of the trellis are
// MET_W bits in the same scale.  These widths are choices of this design.
//
// The interleaver constants are this design's own choice as well: the rule
// kept is that, when J_F*M = J, every information bit falls once in an F row
// and M-1 times in an E row (see il_group).
package spc_pkg;

  // ---------------- main configuration -----------------------------------
  localparam int unsigned K_DEF  = 21845;  // columns per dimension (J*K = 65535)
  localparam int unsigned JE_DEF = 2;      // rows of E
  localparam int unsigned JF_DEF = 1;      // rows of F
  localparam int unsigned M_DEF  = 3;      // number of dimensions
  localparam int unsigned NSTATE = 4;      // states of C-hat

  // ---------------- soft-value formats ------------------------------------
  localparam int unsigned LLR_W  = 8;
  localparam int unsigned LLR_FB = 2;      // the correction table below assumes 2
  localparam int unsigned MET_W  = 12;
  // Posterior LLRs (the decoding loop variable) are kept LLR_W + 2 bits wide:
  // a posterior is the channel value plus up to M extrinsic values, and
  // dividing a stored extrinsic value back out must not lose the rest.
  localparam int unsigned POST_W = LLR_W + 2;

  typedef logic signed [LLR_W-1:0]  llr_t;
  typedef logic signed [POST_W-1:0] post_t;
  typedef logic signed [MET_W-1:0] met_t;

  localparam llr_t LLR_MAX = llr_t'((1 << (LLR_W-1)) - 1);
  localparam llr_t LLR_MIN = llr_t'(-((1 << (LLR_W-1)) - 1));  // symmetric range

  // Saturate a wide value to the LLR range.
  function automatic llr_t sat_llr(input logic signed [MET_W+1:0] v);
    if (v > (MET_W+2)'(LLR_MAX))      return LLR_MAX;
    else if (v < (MET_W+2)'(LLR_MIN)) return LLR_MIN;
    else                          return llr_t'(v);
  endfunction

  // Saturate a wide value to the posterior range.
  function automatic post_t sat_post(input logic signed [MET_W+1:0] v);
    localparam logic signed [MET_W+1:0] MX = (1 <<< (POST_W-1)) - 1;
    if (v > MX)       return post_t'(MX);
    else if (v < -MX) return post_t'(-MX);
    else              return post_t'(v);
  endfunction

  // Saturate a wide value to the metric range.
  function automatic met_t sat_met(input logic signed [MET_W+1:0] v);
    localparam logic signed [MET_W+1:0] MX = (1 <<< (MET_W-1)) - 1;
    if (v > MX)       return met_t'(MX);
    else if (v < -MX) return met_t'(-MX);
    else              return met_t'(v);
  endfunction

  // ln(1 + exp(-d)) for d >= 0 in units of 2^-LLR_FB, rounded to the nearest
  // unit: round(4*ln(1+exp(-d/4))) is 3 at d=0, 2 for d=1..3, 1 for d=4..8,
  // 0 beyond.
  function automatic logic [1:0] jac_corr(input logic [MET_W+1:0] d);
    if (d == 0)      return 2'd3;
    else if (d <= 3) return 2'd2;
    else if (d <= 8) return 2'd1;
    else             return 2'd0;
  endfunction

  // Jacobian logarithm max*(x, y) = ln(exp(x) + exp(y)) on path metrics.
  function automatic met_t max_star(input met_t x, input met_t y);
    logic signed [MET_W+1:0] xx, yy, d, m;
    xx = (MET_W+2)'(x);
    yy = (MET_W+2)'(y);
    d  = (xx > yy) ? xx - yy : yy - xx;
    m  = (xx > yy) ? xx : yy;
    return sat_met(m + (MET_W+2)'(jac_corr(d)));
  endfunction

  // ---------------- the code C-hat: (1+x)/(1+x+x^2) -----------------------
  // State s = {s1, s2}; s1 is the newest register.  Feedback bit
  // w = u ^ s1 ^ s2, parity p' = w ^ s1, next state {w, s1}.
  function automatic logic [1:0] rsc_next(input logic [1:0] s, input logic u);
    return {u ^ s[1] ^ s[0], s[1]};
  endfunction

  function automatic logic rsc_par(input logic [1:0] s, input logic u);
    return u ^ s[0];  // (u ^ s1 ^ s2) ^ s1
  endfunction

  // ---------------- interleaver constants ---------------------------------
  // pi_m maps row r, column k of dimension m to information bit
  //   il_group(m, r) * K + ((il_mult(m, r) * k + il_off(m, r)) mod K).
  function automatic int unsigned gcd(input int unsigned a, input int unsigned b);
    int unsigned x, y, t;
    x = a; y = b;
    while (y != 0) begin
      t = x % y; x = y; y = t;
    end
    return x;
  endfunction

  function automatic int unsigned il_prime(input int unsigned i);
    case (i % 16)
      0: return 1;     1: return 263;   2: return 269;   3: return 271;
      4: return 277;   5: return 281;   6: return 283;   7: return 293;
      8: return 307;   9: return 311;  10: return 313;  11: return 317;
     12: return 331;  13: return 337;  14: return 347;  default: return 349;
    endcase
  endfunction

  // Step of the row's address sequence, reduced mod K and coprime with K.
  function automatic int unsigned il_mult(input int unsigned m, input int unsigned r,
                                          input int unsigned j, input int unsigned k);
    int unsigned a;
    a = il_prime(m * j + r) % k;
    if (a == 0 || gcd(a, k) != 1) a = 1 % k;
    return a;
  endfunction

  function automatic int unsigned il_off(input int unsigned m, input int unsigned r,
                                         input int unsigned k);
    return (m * 97 + r * 131) % k;
  endfunction

  // Group (block of K information bits) read by row r of dimension m.  The
  // F rows r = J_E..J-1 of dimension m read groups m*J_F .. m*J_F+J_F-1 (mod J).
  function automatic int unsigned il_group(input int unsigned m, input int unsigned r,
                                           input int unsigned je, input int unsigned jf);
    return (r + (je + jf) - je + m * jf) % (je + jf);
  endfunction

endpackage
