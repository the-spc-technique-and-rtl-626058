// tb_spc_app_dec: local APP decoder at K = 20, M = 3, (J_E, J_F) = (2, 1),
// with the decoder's memories modelled in the bench.  For each dimension
// and several random codewords (reference encoder):
//   - channel LLRs of +-16 LSB with one information bit of the dimension's
//     E or F rows turned into a weak wrong value: after one pass every
//     information bit has the right sign (the single error is corrected);
//   - every information bit is written exactly once, done comes 2K + 1
//     cycles after start, and post_new = post_old - ext_old + ext_new;
//   - division: the same block decoded again with random stored extrinsic
//     values e and posteriors channel + e gives the same new extrinsic
//     values as the run with e = 0.
module tb_spc_app_dec;
  import spc_pkg::*;
  import tb_spc_ref_pkg::*;
  localparam int K = 20, JE = 2, JF = 1, M = 3, J = JE + JF, N = J * K;
  localparam int AW = $clog2(N), KW = $clog2(K);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init, start, busy, done, wr;
  logic [1:0] dim;
  logic [AW-1:0] ra [J];
  post_t rp [J], wp [J];
  llr_t  re [J], we [J];
  logic [KW-1:0] qcol;
  llr_t rq;

  post_t post [N];
  llr_t  extm [M][N];
  llr_t  lq   [M][K];
  int    nwr  [N];

  spc_app_dec #(.K(K), .JE(JE), .JF(JF), .M(M)) dut (
    .clk, .rst_n, .init, .start, .dim, .busy, .done,
    .rd_addr(ra), .rd_post(rp), .rd_ext(re), .q_col(qcol), .rd_lq(rq),
    .wr_en(wr), .wr_post(wp), .wr_ext(we));

  always_comb begin
    for (int r = 0; r < J; r++) begin
      rp[r] = post[ra[r]];
      re[r] = extm[dim][ra[r]];
    end
    rq = lq[dim][qcol];
  end

  always @(posedge clk)
    if (wr)
      for (int r = 0; r < J; r++) begin
        checks++;
        if (int'(wp[r]) != int'(rp[r]) - int'(re[r]) + int'(we[r])) begin
          failures++;
          $display("%t posterior is not old/ext_old*ext_new", $time);
        end
        post[ra[r]] <= wp[r];
        extm[dim][ra[r]] <= we[r];
        nwr[ra[r]]++;
      end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t %s", $time, what);
    end
  endtask

  task automatic run(int m, output int cyc);
    foreach (nwr[i]) nwr[i] = 0;
    dim = 2'(m); init = 1; start = 1;
    @(negedge clk); init = 0; start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    while (busy) @(negedge clk);
    foreach (nwr[i]) chk(nwr[i] == 1, "each bit written once");
  endtask

  initial begin
    bit d [];
    bit q [];
    llr_t ch [];
    llr_t e0 [];
    int cyc, bad, r, k;
    d = new[N]; ch = new[N]; e0 = new[N];
    init = 0; start = 0; dim = 0;
    foreach (post[i]) post[i] = '0;
    foreach (extm[m, i]) extm[m][i] = '0;
    foreach (lq[m, i]) lq[m][i] = '0;
    void'($urandom(33));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int m;
      m = t % M;
      foreach (d[i]) d[i] = 1'($urandom);
      ref_encode(K, JE, JF, M, d, q);
      foreach (d[i]) ch[i] = d[i] ? llr_t'(-16) : llr_t'(16);
      // away from the block ends: a first pass knows nothing of the circular
      // boundary state, so an error in the first or last column may stay
      r = $urandom_range(J - 1); k = 2 + $urandom_range(K - 5);
      ch[ref_addr(m, r, k, K, JE, JF)] = d[ref_addr(m, r, k, K, JE, JF)] ? llr_t'(4) : llr_t'(-4);
      for (int mm = 0; mm < M; mm++)
        for (int kk = 0; kk < K; kk++) begin
          bit qq; qq = q[mm * K + kk];
          lq[mm][kk] = qq ? llr_t'(-16) : llr_t'(16);
        end
      // run 1: no stored extrinsic values
      foreach (d[i]) begin post[i] = post_t'(ch[i]); extm[m][i] = '0; end
      run(m, cyc);
      chk(cyc == 2 * K + 1, $sformatf("latency 2K+1 (%0d)", cyc));
      bad = 0;
      foreach (d[i]) if ((post[i] < 0) != d[i]) bad++;
      chk(bad == 0, $sformatf("single error corrected (m=%0d r=%0d k=%0d)", m, r, k));
      foreach (d[i]) e0[i] = extm[m][i];
      // run 2: random stored extrinsic values divided out
      foreach (d[i]) begin
        llr_t e;
        e = llr_t'($signed($urandom_range(100)) - 50);
        extm[m][i] = e;
        post[i] = post_t'(ch[i]) + post_t'(e);
      end
      run(m, cyc);
      foreach (d[i]) chk(extm[m][i] == e0[i], "division removes the stored extrinsic value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
