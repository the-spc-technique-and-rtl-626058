// spc_fbox: the parity function f(x, y) = (x*y + 1) / (x + y) of two
// likelihood ratios, the building block of every single-parity-check (SPC)
// computation in the decoder.  If x and y are the LRs that two groups of
// bits have even parity, f(x, y) is the LR that their union has even parity.
//
// The design keeps LRs as fixed-point logarithms (LLRs, spc_pkg), where f
// becomes
//   f(a, b) = ln(1 + e^(a+b)) - ln(e^a + e^b)
//           = sign(a)*sign(b)*min(|a|, |b|) + c(|a+b|) - c(|a-b|),
// with c(d) = ln(1 + e^-d) read from the small table jac_corr.  The formula
// is exact up to the table's rounding; the log-domain form and the table are
// this design's choice, the function itself is the document's.
//
// Purely combinational; result saturated to the LLR range.
module spc_fbox
  import spc_pkg::*;
(
  input  llr_t a,
  input  llr_t b,
  output llr_t f
);
  logic signed [MET_W+1:0] aw, bw, abs_a, abs_b, mn, s, d, sum, dif;

  always_comb begin
    aw    = (MET_W+2)'(a);
    bw    = (MET_W+2)'(b);
    abs_a = (aw < 0) ? -aw : aw;
    abs_b = (bw < 0) ? -bw : bw;
    mn    = (abs_a < abs_b) ? abs_a : abs_b;
    s     = ((aw < 0) != (bw < 0)) ? -mn : mn;
    sum   = (aw + bw < 0) ? -(aw + bw) : aw + bw;
    dif   = (aw - bw < 0) ? -(aw - bw) : aw - bw;
    d     = s + (MET_W+2)'(jac_corr(sum)) - (MET_W+2)'(jac_corr(dif));
    f     = sat_llr(d);
  end
endmodule
