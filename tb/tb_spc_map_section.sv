// tb_spc_map_section: random trellis sections against an exact
// (floating-point log-sum-exp) BCJR section of the code (1+x)/(1+x+x^2),
// written here from the state equations.  Metrics are compared after
// normalising both to state 0; tolerance covers the rounding of the
// Jacobian correction table.
module tb_spc_map_section;
  import spc_pkg::*;
  import tb_spc_ref_pkg::*;
  met_t ai [NSTATE], bi [NSTATE], ao [NSTATE], bo [NSTATE];
  llr_t lp, lpp, xp, xpp;
  int checks = 0, failures = 0;

  spc_map_section dut (.alpha_in(ai), .beta_in(bi), .lp, .lpp,
                       .alpha_out(ao), .beta_out(bo), .ext_p(xp), .ext_pp(xpp));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, real got, real ex, real tol);
    checks++;
    if (got - ex > tol || ex - got > tol) begin
      failures++;
      if (failures < 10) $display("%s: got %f expected %f", what, got, ex);
    end
  endtask

  initial begin
    real A [4], B [4], e;
    void'($urandom(11));
    for (int t = 0; t < 5000; t++) begin
      for (int s = 0; s < 4; s++) begin
        ai[s] = met_t'($signed($urandom_range(160)) - 80);
        bi[s] = met_t'($signed($urandom_range(160)) - 80);
        A[s] = real'(ai[s]); B[s] = real'(bi[s]);
      end
      lp  = llr_t'($signed($urandom_range(200)) - 100);
      lpp = llr_t'($signed($urandom_range(200)) - 100);
      #1;
      begin
        real sc, NA2 [4], NB2 [4], U02, U12, Q02, Q12;
        sc = real'(1 << LLR_FB);
        for (int s = 0; s < 4; s++) begin NA2[s] = -1.0e9; NB2[s] = -1.0e9; end
        U02 = -1.0e9; U12 = -1.0e9; Q02 = -1.0e9; Q12 = -1.0e9;
        for (int s = 0; s < 4; s++)
          for (int u = 0; u < 2; u++) begin
            int s1, s2, w, par, ns;
            real gp, gq;
            s1 = (s >> 1) & 1; s2 = s & 1;
            w = u ^ s1 ^ s2; par = w ^ s1; ns = w * 2 + s1;
            gp = (u == 0) ? real'(lp) / sc : 0.0;
            gq = (par == 0) ? real'(lpp) / sc : 0.0;
            NA2[ns] = lse(NA2[ns], A[s] / sc + gp + gq);
            NB2[s]  = lse(NB2[s],  B[ns] / sc + gp + gq);
            if (u == 0) U02 = lse(U02, A[s] / sc + gq + B[ns] / sc);
            else        U12 = lse(U12, A[s] / sc + gq + B[ns] / sc);
            if (par == 0) Q02 = lse(Q02, A[s] / sc + gp + B[ns] / sc);
            else          Q12 = lse(Q12, A[s] / sc + gp + B[ns] / sc);
          end
        for (int s = 0; s < 4; s++) begin
          chk("alpha", real'(ao[s]), (NA2[s] - NA2[0]) * sc, 2.0);
          chk("beta",  real'(bo[s]), (NB2[s] - NB2[0]) * sc, 2.0);
        end
        e = (U02 - U12) * sc; if (e > 127.0) e = 127.0; if (e < -127.0) e = -127.0;
        chk("ext_p", real'(xp), e, 3.5);
        e = (Q02 - Q12) * sc; if (e > 127.0) e = 127.0; if (e < -127.0) e = -127.0;
        chk("ext_pp", real'(xpp), e, 3.5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
