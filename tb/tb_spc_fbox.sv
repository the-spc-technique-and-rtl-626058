// tb_spc_fbox: exhaustive check of the f-function against the exact
// log-domain formula ln((e^(x+y) + 1) / (e^x + e^y)); allowed error is one
// LSB, the rounding of the correction table.
module tb_spc_fbox;
  import spc_pkg::*;
  import tb_spc_ref_pkg::*;
  llr_t a, b, f;
  int checks = 0, failures = 0;

  spc_fbox dut (.a, .b, .f);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sc, ex;
    sc = real'(1 << LLR_FB);
    for (int x = -127; x <= 127; x++)
      for (int y = -127; y <= 127; y++) begin
        a = llr_t'(x); b = llr_t'(y);
        #1;
        ex = boxplus(real'(x) / sc, real'(y) / sc) * sc;
        checks++;
        if ((real'(f) - ex) > 1.0001 || (ex - real'(f)) > 1.0001) begin
          failures++;
          if (failures < 10) $display("f(%0d,%0d) = %0d, expected %f", x, y, f, ex);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
