// tb_spc_rsc_enc: two encoders, K = 20 (K mod 3 = 2) and K = 7 (K mod 3 = 1).
// Each codes random blocks twice: pass 1 from state 0, then the circular
// state is loaded and pass 2 must end in the state it started from; every
// parity bit is compared with a shift-register model of (1+x)/(1+x+x^2).
module tb_spc_rsc_enc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       clr [2], circ [2], en [2], u [2], p [2];
  logic [1:0] st [2];

  spc_rsc_enc #(.K(20)) dut0 (.clk, .rst_n, .clear(clr[0]), .load_circ(circ[0]), .en(en[0]),
                              .u(u[0]), .p(p[0]), .state(st[0]));
  spc_rsc_enc #(.K(7))  dut1 (.clk, .rst_n, .clear(clr[1]), .load_circ(circ[1]), .en(en[1]),
                              .u(u[1]), .p(p[1]), .state(st[1]));

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

  task automatic run(int i, int K);
    bit d [];
    bit s1, s2, w;
    logic [1:0] sc;
    d = new[K];
    foreach (d[k]) d[k] = 1'($urandom);
    @(negedge clk); clr[i] = 1;
    @(negedge clk); clr[i] = 0;
    s1 = 0; s2 = 0;
    for (int k = 0; k < K; k++) begin
      en[i] = 1; u[i] = d[k];
      #1 chk(p[i] == (d[k] ^ s1 ^ s2 ^ s1), "pass-1 parity");
      w = d[k] ^ s1 ^ s2; s2 = s1; s1 = w;
      @(negedge clk);
    end
    en[i] = 0;
    chk(st[i] == {s1, s2}, "pass-1 end state");
    circ[i] = 1;
    @(negedge clk); circ[i] = 0;
    sc = st[i];
    s1 = sc[1]; s2 = sc[0];
    for (int k = 0; k < K; k++) begin
      en[i] = 1; u[i] = d[k];
      #1 chk(p[i] == (d[k] ^ s1 ^ s2 ^ s1), "pass-2 parity");
      w = d[k] ^ s1 ^ s2; s2 = s1; s1 = w;
      @(negedge clk);
    end
    en[i] = 0;
    chk(st[i] == sc, "circular: end state equals start state");
  endtask

  initial begin
    void'($urandom(3));
    for (int i = 0; i < 2; i++) begin clr[i] = 0; circ[i] = 0; en[i] = 0; u[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      run(0, 20);
      run(1, 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
