// tb_spc_conv_enc: SPC-convolutional encoder of dimension 1 (second
// interleaver), K = 20, (J_E, J_F) = (2, 1).  The bench holds random
// information blocks in an array that answers the encoder's reads, collects
// q_0..q_(K-1) and compares them with the reference encoder; it also checks
// the column order and that done comes 2K + 2 cycles after start.
module tb_spc_conv_enc;
  import tb_spc_ref_pkg::*;
  localparam int K = 20, JE = 2, JF = 1, M = 3, J = JE + JF, N = J * K, DIM = 1;
  localparam int AW = $clog2(N), KW = $clog2(K);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, qv, qb, busy, done;
  logic [AW-1:0] ra [J];
  logic rb [J];
  logic [KW-1:0] qc;
  bit d [];

  spc_conv_enc #(.K(K), .JE(JE), .JF(JF), .M(M), .DIM(DIM)) dut (
    .clk, .rst_n, .start, .rd_addr(ra), .rd_bit(rb),
    .q_valid(qv), .q_bit(qb), .q_col(qc), .busy, .done);

  always_comb for (int r = 0; r < J; r++) rb[r] = (d.size() == N) ? d[ra[r]] : 1'b0;

  initial begin
    repeat (10000) @(posedge clk);
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
    bit q [];
    int cyc, nq;
    d = new[N];
    start = 0;
    void'($urandom(5));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      foreach (d[i]) d[i] = 1'($urandom);
      ref_encode(K, JE, JF, M, d, q);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1; nq = 0;
      while (!done) begin
        if (qv) begin
          chk(int'(qc) == nq, "column order");
          begin int kk; kk = DIM * K + int'(qc); chk(qb == q[kk], "q bit"); end
          nq++;
        end
        @(negedge clk); cyc++;
      end
      chk(nq == K, "K redundant bits");
      chk(cyc == 2 * K + 2, "latency 2K+2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
