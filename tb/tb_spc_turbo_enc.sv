// tb_spc_turbo_enc: full M = 3 encoder at K = 20 (60 information bits).
// Loads random blocks bit by bit, collects q(1..3) and compares them with
// the reference encoder, and checks that done comes 2K + 2 cycles after the
// last information bit and that the encoder accepts the next block.
module tb_spc_turbo_enc;
  import tb_spc_ref_pkg::*;
  localparam int K = 20, JE = 2, JF = 1, M = 3, J = JE + JF, N = J * K;
  localparam int KW = $clog2(K);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, ir, qv, done;
  logic qb [M];
  logic [KW-1:0] qc;

  spc_turbo_enc #(.K(K), .JE(JE), .JF(JF), .M(M)) dut (
    .clk, .rst_n, .in_valid(iv), .in_bit(ib), .in_ready(ir),
    .q_valid(qv), .q_bits(qb), .q_col(qc), .done);

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    bit d [];
    bit q [];
    int cyc, nq;
    d = new[N];
    iv = 0; ib = 0;
    void'($urandom(9));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      foreach (d[i]) d[i] = 1'($urandom);
      ref_encode(K, JE, JF, M, d, q);
      for (int i = 0; i < N; i++) begin
        while (!ir) @(negedge clk);
        iv = 1; ib = d[i];
        @(negedge clk);
      end
      iv = 0;
      cyc = 0; nq = 0;
      while (!done) begin
        if (qv) begin
          chk(int'(qc) == nq, "column order");
          for (int m = 0; m < M; m++) begin int kk; bit qq; kk = m * K + int'(qc); qq = q[kk]; chk(qb[m] == qq, "q bit"); end
          nq++;
        end
        @(negedge clk); cyc++;
      end
      chk(nq == K, "K columns");
      chk(cyc == 2 * K + 2, "latency 2K+2 after the last bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
