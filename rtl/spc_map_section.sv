// spc_map_section: one trellis section of the MAP (BCJR) decoder of the
// 4-state convolutional code C-hat = (1+x)/(1+x+x^2), Step 2 of the local APP
// decoder.  C-hat is treated as the rate-1/2 code p -> (p, p'): at section k
// the a priori LLRs of the systematic bit p_k and of the parity bit p'_k come
// from the column parities (Step 1).
//
// Log-domain (log-MAP) arithmetic with the Jacobian logarithm max* of
// spc_pkg.  The branch metric of input u from state s is
//   g(s,u) = (u == 0 ? lp : 0) + (p'(s,u) == 0 ? lpp : 0),
// which is ln Pr up to a constant per section.
//   alpha_out(s') = max*_{(s,u) -> s'} alpha_in(s) + g(s,u)
//   beta_out(s)   = max*_u beta_in(next(s,u)) + g(s,u)
//   ext_p   = max*_{u=0}(alpha + g_p' + beta) - max*_{u=1}(...)
//   ext_pp  = max*_{p'=0}(alpha + g_p + beta) - max*_{p'=1}(...)
// The extrinsic outputs leave out the bit's own a priori term.  New metrics
// are normalised so that state 0 is zero.  The document names the standard
// MAP algorithm for this step; the log domain, the fixed point and the
// normalisation are this design's choices.
//
// Purely combinational: alpha_in/beta_in are the metrics alpha_k and
// beta_(k+1); alpha_out is alpha_(k+1), beta_out is beta_k.
module spc_map_section
  import spc_pkg::*;
(
  input  met_t alpha_in [NSTATE],
  input  met_t beta_in  [NSTATE],
  input  llr_t lp,                    // a priori LLR of p_k
  input  llr_t lpp,                   // a priori LLR of p'_k
  output met_t alpha_out [NSTATE],
  output met_t beta_out  [NSTATE],
  output llr_t ext_p,                 // extrinsic LLR of p_k
  output llr_t ext_pp                 // extrinsic LLR of p'_k
);
  localparam met_t NEG = met_t'(-(1 << (MET_W-2)));  // "minus infinity" seed

  function automatic met_t madd(input met_t x, input met_t y, input met_t z);
    return sat_met((MET_W+2)'(x) + (MET_W+2)'(y) + (MET_W+2)'(z));
  endfunction

  met_t gp  [2];   // contribution of p for u = 0/1
  met_t gpp [2];   // contribution of p' for p' = 0/1
  met_t a_raw [NSTATE];
  met_t b_raw [NSTATE];
  met_t u0, u1, q0, q1;

  always_comb begin
    gp[0]  = met_t'(lp);
    gp[1]  = '0;
    gpp[0] = met_t'(lpp);
    gpp[1] = '0;

    for (int s = 0; s < NSTATE; s++) begin
      a_raw[s] = NEG;
      b_raw[s] = NEG;
    end
    u0 = NEG; u1 = NEG; q0 = NEG; q1 = NEG;

    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic [1:0] ns;
        logic       pb;
        ns = rsc_next(2'(s), u[0]);
        pb = rsc_par(2'(s), u[0]);
        a_raw[ns] = max_star(a_raw[ns], madd(alpha_in[s], gp[u], gpp[pb]));
        b_raw[s]  = max_star(b_raw[s],  madd(beta_in[ns], gp[u], gpp[pb]));
        if (u == 0) u0 = max_star(u0, madd(alpha_in[s], gpp[pb], beta_in[ns]));
        else        u1 = max_star(u1, madd(alpha_in[s], gpp[pb], beta_in[ns]));
        if (pb == 1'b0) q0 = max_star(q0, madd(alpha_in[s], gp[u], beta_in[ns]));
        else            q1 = max_star(q1, madd(alpha_in[s], gp[u], beta_in[ns]));
      end
    end

    for (int s = 0; s < NSTATE; s++) begin
      alpha_out[s] = sat_met((MET_W+2)'(a_raw[s]) - (MET_W+2)'(a_raw[0]));
      beta_out[s]  = sat_met((MET_W+2)'(b_raw[s]) - (MET_W+2)'(b_raw[0]));
    end
    ext_p  = sat_llr((MET_W+2)'(u0) - (MET_W+2)'(u1));
    ext_pp = sat_llr((MET_W+2)'(q0) - (MET_W+2)'(q1));
  end
endmodule
