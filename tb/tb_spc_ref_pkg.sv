// tb_spc_ref_pkg: reference models for the SPC-turbo testbenches.
//
// ref_addr gives interleaver pi_m by its defining formula (the step, offset
// and group constants of spc_pkg); ref_encode encodes an information block
// in plain procedural code: column parities, the convolutional code
// (1+x)/(1+x+x^2) run from the one start state that equals its end state
// (found by trying all four), and q = parity of the F column and p'.
// boxplus and gauss help the decoder benches.
package tb_spc_ref_pkg;
  import spc_pkg::*;

  function automatic int ref_addr(int m, int r, int k, int K, int JE, int JF);
    int J = JE + JF;
    return il_group(m, r, JE, JF) * K + (il_mult(m, r, J, K) * k + il_off(m, r, K)) % K;
  endfunction

  // q[m*K + k] for all m, k
  function automatic void ref_encode(input int K, input int JE, input int JF, input int M,
                                     input bit d[], output bit q[]);
    int J = JE + JF;
    bit p [];
    p = new[K];
    q = new[M * K];
    for (int m = 0; m < M; m++) begin
      int sc = -1;
      for (int k = 0; k < K; k++) begin
        p[k] = 0;
        for (int r = 0; r < JE; r++) p[k] ^= d[ref_addr(m, r, k, K, JE, JF)];
      end
      for (int s0 = 0; s0 < 4; s0++) begin
        bit s1, s2, w;
        s1 = s0[1]; s2 = s0[0];
        for (int k = 0; k < K; k++) begin
          w = p[k] ^ s1 ^ s2; s2 = s1; s1 = w;
        end
        if ({s1, s2} == 2'(s0)) begin
          if (sc != -1) $fatal(1, "more than one circular state");
          sc = s0;
        end
      end
      begin
        bit s1, s2, w, pp, f;
        s1 = sc[1]; s2 = sc[0];
        for (int k = 0; k < K; k++) begin
          w  = p[k] ^ s1 ^ s2;
          pp = w ^ s1;
          s2 = s1; s1 = w;
          f = 0;
          for (int r = JE; r < J; r++) f ^= d[ref_addr(m, r, k, K, JE, JF)];
          q[m * K + k] = f ^ pp;
        end
      end
    end
  endfunction

  function automatic real lse(real a, real b);
    real mx = (a > b) ? a : b;
    return mx + $ln($exp(a - mx) + $exp(b - mx));
  endfunction

  // exact parity combination of LLRs (natural-log units):
  // ln((e^(a+b) + 1) / (e^a + e^b))
  function automatic real boxplus(real a, real b);
    return lse(a + b, 0.0) - lse(a, b);
  endfunction


  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // BPSK (+1 for bit 0) over AWGN with deviation sigma, quantised LLR
  function automatic llr_t chan_llr(bit b, real sigma);
    real y, l;
    int  q;
    y = (b ? -1.0 : 1.0) + sigma * gauss();
    l = 2.0 * y / (sigma * sigma) * real'(1 << LLR_FB);
    q = (l >= 0.0) ? int'(l + 0.5) : -int'(-l + 0.5);
    if (q > int'(LLR_MAX)) q = int'(LLR_MAX);
    if (q < int'(LLR_MIN)) q = int'(LLR_MIN);
    return llr_t'(q);
  endfunction
endpackage
