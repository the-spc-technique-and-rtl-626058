// tb_spc_turbo_codec: end-to-end run of the SPC-turbo codec at K = 50 (150 information bits).
// Random information blocks go through the codec's encoder; the bench
// compares the redundant bits with its reference encoder, sends the
// codeword over a simulated BPSK/AWGN channel (Eb/N0 = 3.0 dB, rate 1/2),
// loads the channel LLRs into the codec's decoder and decodes with 8
// iterations.  Checks: encoder output, encoder and decoder timing, error-free
// decoding.  Mechanisms counted, each must occur: circular termination
// (every dimension's redundant bits match the tail-biting reference), local
// decoder passes over all M dimensions, iterations, channel errors corrected,
// decoding of more than one block (boundary metrics reset).
module tb_spc_turbo_codec;
  import spc_pkg::*;
  import tb_spc_ref_pkg::*;
  localparam int K = 50, JE = JE_DEF, JF = JF_DEF, M = M_DEF, J = JE + JF, N = J * K;
  localparam int AW = $clog2(N), KW = $clog2(K), SW = $clog2(M + 1);
  localparam int NBLK = 4, NIT = 8;
  localparam real EBN0_DB = 3.0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, ir, qv, edone;
  logic qb [M];
  logic [KW-1:0] qc;
  logic ldv, start, busy, done, rbit;
  logic [SW-1:0] lsel;
  logic [AW-1:0] laddr, raddr;
  llr_t lllr;
  post_t rllr;
  logic [5:0] nit;

  spc_turbo_codec #(.K(K)) dut (
    .clk, .rst_n,
    .enc_in_valid(iv), .enc_in_bit(ib), .enc_in_ready(ir),
    .enc_q_valid(qv), .enc_q_bits(qb), .enc_q_col(qc), .enc_done(edone),
    .dec_ld_valid(ldv), .dec_ld_sel(lsel), .dec_ld_addr(laddr), .dec_ld_llr(lllr),
    .dec_start(start), .dec_n_iter(nit), .dec_busy(busy), .dec_done(done),
    .dec_rd_addr(raddr), .dec_rd_llr(rllr), .dec_rd_bit(rbit));

  initial begin
    repeat (300000) @(posedge clk);
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

  // count local decoder passes per dimension
  int passes [M];
  always @(posedge clk)
    if (rst_n && dut.u_dec.u_app.done) passes[dut.u_dec.dim]++;

  task automatic load(int sel, int addr, llr_t v);
    ldv = 1; lsel = SW'(sel); laddr = AW'(addr); lllr = v;
    @(negedge clk);
    ldv = 0;
  endtask

  initial begin
    bit d [];
    bit q [];
    bit qenc [];
    int cyc, nq, raw, err, corrected, circ_ok, blocks, qmis;
    real sigma;
    sigma = $sqrt(1.0 / (2.0 * 0.5 * $pow(10.0, EBN0_DB / 10.0)));
    d = new[N]; qenc = new[M * K];
    iv = 0; ib = 0; ldv = 0; start = 0; lsel = 0; laddr = 0; lllr = 0; raddr = 0; nit = 0;
    corrected = 0; circ_ok = 0; blocks = 0;
    foreach (passes[m]) passes[m] = 0;
    void'($urandom(41));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      foreach (d[i]) d[i] = 1'($urandom);
      ref_encode(K, JE, JF, M, d, q);
      // encode
      for (int i = 0; i < N; i++) begin
        while (!ir) @(negedge clk);
        iv = 1; ib = d[i];
        @(negedge clk);
      end
      iv = 0;
      cyc = 0; nq = 0;
      while (!edone) begin
        if (qv) begin
          for (int m = 0; m < M; m++) begin int kk; kk = m * K + int'(qc); qenc[kk] = qb[m]; end
          nq++;
        end
        @(negedge clk); cyc++;
      end
      chk(nq == K && cyc == 2 * K + 2, "encoder timing");
      qmis = 0;
      for (int i = 0; i < M * K; i++) if (qenc[i] != q[i]) qmis++;
      chk(qmis == 0, "encoder output");
      if (qmis == 0) circ_ok++;
      // channel and decoder load
      raw = 0;
      for (int i = 0; i < N; i++) begin
        llr_t c;
        c = chan_llr(d[i], sigma);
        if ((c < 0) != d[i]) raw++;
        load(0, i, c);
      end
      for (int m = 0; m < M; m++)
        for (int k = 0; k < K; k++) begin
          bit qq; qq = qenc[m * K + k];
          load(m + 1, k, chan_llr(qq, sigma));
        end
      // decode
      nit = 6'(NIT); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc == 1 + NIT * M * (2 * K + 2), "decoder timing");
      err = 0;
      for (int i = 0; i < N; i++) begin
        raddr = AW'(i); #1;
        if (rbit != d[i]) err++;
      end
      chk(err == 0, "block decoded without error");
      $display("block %0d: %0d bits, channel errors %0d, after decoding %0d", b, N, raw, err);
      if (raw > 0 && err == 0) corrected++;
      blocks++;
      @(negedge clk);
    end
    chk(circ_ok == NBLK, "circular termination in every block");
    for (int m = 0; m < M; m++) chk(passes[m] == NBLK * NIT, "every dimension decoded each iteration");
    chk(NIT > 1, "more than one iteration");
    chk(corrected > 0, "channel errors corrected");
    chk(blocks == NBLK, "blocks decoded");
    $display("mechanisms: circular-terminated blocks %0d, dimension passes %0d/%0d/%0d, blocks with corrected errors %0d",
             circ_ok, passes[0], passes[1], passes[M - 1], corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
