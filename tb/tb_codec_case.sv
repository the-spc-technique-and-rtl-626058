// tb_codec_case: one configuration of the SPC-turbo codec run end to end,
// used by tb_spc_workloads.  On `go` it encodes NBLK random blocks with the
// codec's encoder, checks them against the reference encoder, sends them over
// a simulated BPSK/AWGN channel at EBN0_DB (noise scaled by the code rate
// J/(J+M)), decodes with NIT iterations and counts decoding errors.  It
// raises `fin` when done and reports its counts.
module tb_codec_case
  import spc_pkg::*;
  import tb_spc_ref_pkg::*;
#(
  parameter int  K       = 341,
  parameter int  JE      = 2,
  parameter int  JF      = 1,
  parameter int  NBLK    = 1,
  parameter int  NIT     = 10,
  parameter real EBN0_DB = 2.0,
  parameter string LABEL = "case"
) (
  input  logic clk,
  input  logic go,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   raw_errors,
  output int   bit_errors
);
  localparam int M = M_DEF, J = JE + JF, N = J * K;
  localparam int AW = $clog2(N), KW = $clog2(K), SW = $clog2(M + 1);

  logic rst_n = 0;
  logic iv, ib, ir, qv, edone;
  logic qb [M];
  logic [KW-1:0] qc;
  logic ldv, start, busy, done, rbit;
  logic [SW-1:0] lsel;
  logic [AW-1:0] laddr, raddr;
  llr_t lllr;
  post_t rllr;
  logic [5:0] nit;

  spc_turbo_codec #(.K(K), .JE(JE), .JF(JF)) dut (
    .clk, .rst_n,
    .enc_in_valid(iv), .enc_in_bit(ib), .enc_in_ready(ir),
    .enc_q_valid(qv), .enc_q_bits(qb), .enc_q_col(qc), .enc_done(edone),
    .dec_ld_valid(ldv), .dec_ld_sel(lsel), .dec_ld_addr(laddr), .dec_ld_llr(lllr),
    .dec_start(start), .dec_n_iter(nit), .dec_busy(busy), .dec_done(done),
    .dec_rd_addr(raddr), .dec_rd_llr(rllr), .dec_rd_bit(rbit));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s: %s", LABEL, what);
    end
  endtask

  task automatic load(int sel, int addr, llr_t v);
    ldv = 1; lsel = SW'(sel); laddr = AW'(addr); lllr = v;
    @(negedge clk);
    ldv = 0;
  endtask

  initial begin
    bit d [];
    bit q [];
    bit qenc [];
    int cyc, qmis;
    real sigma, rate;
    fin = 0; checks = 0; failures = 0; raw_errors = 0; bit_errors = 0;
    iv = 0; ib = 0; ldv = 0; start = 0; lsel = 0; laddr = 0; lllr = 0; raddr = 0; nit = 0;
    rate  = real'(J) / real'(J + M);
    sigma = $sqrt(1.0 / (2.0 * rate * $pow(10.0, EBN0_DB / 10.0)));
    d = new[N]; qenc = new[M * K];
    wait (go);
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      foreach (d[i]) d[i] = 1'($urandom);
      ref_encode(K, JE, JF, M, d, q);
      for (int i = 0; i < N; i++) begin
        while (!ir) @(negedge clk);
        iv = 1; ib = d[i];
        @(negedge clk);
      end
      iv = 0;
      while (!edone) begin
        if (qv) for (int m = 0; m < M; m++) begin int kk; kk = m * K + int'(qc); qenc[kk] = qb[m]; end
        @(negedge clk);
      end
      qmis = 0;
      for (int i = 0; i < M * K; i++) if (qenc[i] != q[i]) qmis++;
      chk(qmis == 0, "encoder output");
      for (int i = 0; i < N; i++) begin
        llr_t c;
        c = chan_llr(d[i], sigma);
        if ((c < 0) != d[i]) raw_errors++;
        load(0, i, c);
      end
      for (int m = 0; m < M; m++)
        for (int k = 0; k < K; k++) begin
          bit qq; qq = qenc[m * K + k];
          load(m + 1, k, chan_llr(qq, sigma));
        end
      nit = 6'(NIT); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc == 1 + NIT * M * (2 * K + 2), "decoder timing");
      for (int i = 0; i < N; i++) begin
        raddr = AW'(i); #1;
        if (rbit != d[i]) bit_errors++;
      end
      @(negedge clk);
    end
    chk(bit_errors == 0, "error-free decoding");
    $display("%s: (J_E,J_F)=(%0d,%0d) K=%0d N=%0d rate=%0d/%0d Eb/N0=%0.2f dB: channel errors %0d, decoded errors %0d",
             LABEL, JE, JF, K, N, J, J + M, EBN0_DB, raw_errors, bit_errors);
    fin = 1;
  end
endmodule
