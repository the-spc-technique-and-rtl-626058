// tb_spc_col_app: random columns of 3 bits and of 1 bit.  Step 1 output is
// compared with the exact parity LLR of all bits, Step 3 outputs with the
// exact parity LLR of the other bits and the parity bit's extrinsic input.
// Tolerance: the rounding of the f-functions on the path (2.5 LSB).
module tb_spc_col_app;
  import spc_pkg::*;
  import tb_spc_ref_pkg::*;
  localparam int R = 3;
  llr_t l [R];
  llr_t ax, plr, ext [R];
  llr_t l1 [1];
  llr_t plr1, ext1 [1];
  int checks = 0, failures = 0;

  spc_col_app #(.R(R)) dut  (.l(l),  .a_ext(ax), .plr(plr),  .ext(ext));
  spc_col_app #(.R(1)) dut1 (.l(l1), .a_ext(ax), .plr(plr1), .ext(ext1));

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
    real sc, e;
    sc = real'(1 << LLR_FB);
    void'($urandom(7));
    for (int t = 0; t < 5000; t++) begin
      for (int j = 0; j < R; j++) l[j] = llr_t'($signed($urandom_range(120)) - 60);
      ax = llr_t'($signed($urandom_range(160)) - 80);
      l1[0] = l[0];
      #1;
      e = real'(l[0]) / sc;
      for (int j = 1; j < R; j++) e = boxplus(e, real'(l[j]) / sc);
      chk("plr", real'(plr), e * sc, 2.5);
      for (int j = 0; j < R; j++) begin
        e = real'(ax) / sc;
        for (int i = 0; i < R; i++) if (i != j) e = boxplus(e, real'(l[i]) / sc);
        chk("ext", real'(ext[j]), e * sc, 2.5);
      end
      chk("plr1", real'(plr1), real'(l[0]), 0.0);
      chk("ext1", real'(ext1[0]), real'(ax), 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
