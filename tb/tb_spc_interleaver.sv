// tb_spc_interleaver: K = 20, (J_E, J_F) = (2, 1), M = 3.  For every
// dimension it steps through all columns forwards, then backwards, and
// checks that (a) each dimension reads every information bit exactly once,
// (b) over the M dimensions every bit is read once in an F row and twice in
// E rows, (c) the backward walk returns the forward addresses, (d) the
// column counter and the addresses follow the defining formula.
module tb_spc_interleaver;
  import tb_spc_ref_pkg::*;
  localparam int K = 20, JE = 2, JF = 1, M = 3, J = JE + JF, N = J * K;
  localparam int AW = $clog2(N), KW = $clog2(K);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] dim;
  logic init_f, init_b, step_f, step_b;
  logic [AW-1:0] addr [J];
  logic [KW-1:0] col;

  spc_interleaver #(.K(K), .JE(JE), .JF(JF), .M(M)) dut (
    .clk, .rst_n, .dim, .init_fwd(init_f), .init_bwd(init_b),
    .step_fwd(step_f), .step_bwd(step_b), .addr, .col);

  initial begin
    repeat (5000) @(posedge clk);
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

  int seen [M][N];
  int in_f [N];
  int in_e [N];
  int fwd [M][K][J];

  initial begin
    dim = 0; init_f = 0; init_b = 0; step_f = 0; step_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < M; m++) begin
      dim = 2'(m);
      init_f = 1; @(negedge clk); init_f = 0;
      for (int k = 0; k < K; k++) begin
        chk(col == KW'(k), "forward column");
        for (int r = 0; r < J; r++) begin
          fwd[m][k][r] = int'(addr[r]);
          chk(int'(addr[r]) == ref_addr(m, r, k, K, JE, JF), "address formula");
          seen[m][addr[r]]++;
          if (r < JE) in_e[addr[r]]++; else in_f[addr[r]]++;
        end
        step_f = 1; @(negedge clk); step_f = 0;
      end
      init_b = 1; @(negedge clk); init_b = 0;
      for (int k = K - 1; k >= 0; k--) begin
        chk(col == KW'(k), "backward column");
        for (int r = 0; r < J; r++) chk(int'(addr[r]) == fwd[m][k][r], "backward address");
        step_b = 1; @(negedge clk); step_b = 0;
      end
    end
    for (int i = 0; i < N; i++) begin
      for (int m = 0; m < M; m++) chk(seen[m][i] == 1, "bit read once per dimension");
      chk(in_f[i] == 1, "bit once in F");
      chk(in_e[i] == 2, "bit twice in E");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
