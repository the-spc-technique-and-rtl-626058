// tb_spc_turbo_dec: iterative decoder at K = 50 (150 information bits),
// M = 3, (J_E, J_F) = (2, 1).  Random blocks are encoded by the reference
// encoder, sent over a simulated BPSK/AWGN channel (Eb/N0 = 3 dB), loaded
// and decoded with 8 iterations.  Checks: every block decodes without error
// although the channel made errors, the decoding time is
// 1 + n_iter * M * (2K + 2) cycles, and n_iter = 0 returns the channel
// values unchanged.
module tb_spc_turbo_dec;
  import spc_pkg::*;
  import tb_spc_ref_pkg::*;
  localparam int K = 50, JE = 2, JF = 1, M = 3, J = JE + JF, N = J * K;
  localparam int AW = $clog2(N), SW = $clog2(M + 1);
  localparam int NBLK = 6, NIT = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ldv, start, busy, done, rbit;
  logic [SW-1:0] lsel;
  logic [AW-1:0] laddr, raddr;
  llr_t lllr;
  post_t rllr;
  logic [5:0] nit;

  spc_turbo_dec #(.K(K), .JE(JE), .JF(JF), .M(M)) dut (
    .clk, .rst_n, .ld_valid(ldv), .ld_sel(lsel), .ld_addr(laddr), .ld_llr(lllr),
    .start, .n_iter(nit), .busy, .done, .rd_addr(raddr), .rd_llr(rllr), .rd_bit(rbit));

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic load(int sel, int addr, llr_t v);
    ldv = 1; lsel = SW'(sel); laddr = AW'(addr); lllr = v;
    @(negedge clk);
    ldv = 0;
  endtask

  initial begin
    bit d [];
    bit q [];
    llr_t ch [];
    int cyc, raw, err, corrected;
    real sigma;
    sigma = $sqrt(1.0 / (2.0 * 0.5 * $pow(10.0, 3.0 / 10.0)));
    d = new[N]; ch = new[N];
    ldv = 0; start = 0; lsel = 0; laddr = 0; lllr = 0; raddr = 0; nit = 0;
    void'($urandom(21));
    corrected = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      foreach (d[i]) d[i] = 1'($urandom);
      ref_encode(K, JE, JF, M, d, q);
      raw = 0;
      for (int i = 0; i < N; i++) begin
        ch[i] = chan_llr(d[i], sigma);
        if ((ch[i] < 0) != d[i]) raw++;
        load(0, i, ch[i]);
      end
      for (int m = 0; m < M; m++)
        for (int k = 0; k < K; k++) begin
          bit qq; qq = q[m * K + k];
          load(m + 1, k, chan_llr(qq, sigma));
        end
      // n_iter = 0 on the first block: nothing changes
      if (b == 0) begin
        nit = 0; start = 1; @(negedge clk); start = 0;
        chk(done == 1'b1, "n_iter = 0 finishes at once");
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          raddr = AW'(i); #1;
          chk(rllr == post_t'(ch[i]), "n_iter = 0 leaves channel LLRs");
        end
      end
      nit = 6'(NIT); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc == 1 + NIT * M * (2 * K + 2), "decoding time");
      err = 0;
      for (int i = 0; i < N; i++) begin
        raddr = AW'(i); #1;
        if (rbit != d[i]) err++;
        chk(rbit == d[i], "decoded bit");
      end
      $display("block %0d: channel errors %0d, after decoding %0d", b, raw, err);
      if (raw > 0 && err == 0) corrected++;
      @(negedge clk);
    end
    chk(corrected > 0, "channel errors were corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
