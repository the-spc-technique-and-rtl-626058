// tb_spc_workloads: the code configurations whose performance is plotted
// for this code family, each run for one block end to end through the codec
// built for that configuration (M = 3, 4-state C-hat, 10 iterations), at
// an Eb/N0 about 1 dB above the Shannon limit of its rate:
//   (J_E, J_F) = (2, 1), rate 1/2, 1023 bits            at 2.0 dB
//   (J_E, J_F) = (3, 0), rate 1/2, 1023 bits            at 2.0 dB
//   (J_E, J_F) = (6, 3), rate 3/4, 65538 bits (K=7282)  at 2.6 dB
//   (J_E, J_F) = (9, 18), rate 9/10, 65556 bits (K=2428) at 4.2 dB
// The rate-1/2, 65535-bit configuration is the default build and is run by
// tb_spc_turbo_codec_full.  Each block must decode without error.
module tb_spc_workloads;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NC = 4;
  logic go [NC], fin [NC];
  int c [NC], f [NC], raw [NC], be [NC];
  int checks, failures;

  tb_codec_case #(.K(341),  .JE(2), .JF(1),  .EBN0_DB(2.0), .LABEL("R=1/2 (2,1) 1023"))
    u0 (.clk, .go(go[0]), .fin(fin[0]), .checks(c[0]), .failures(f[0]), .raw_errors(raw[0]), .bit_errors(be[0]));
  tb_codec_case #(.K(341),  .JE(3), .JF(0),  .EBN0_DB(2.0), .LABEL("R=1/2 (3,0) 1023"))
    u1 (.clk, .go(go[1]), .fin(fin[1]), .checks(c[1]), .failures(f[1]), .raw_errors(raw[1]), .bit_errors(be[1]));
  tb_codec_case #(.K(7282), .JE(6), .JF(3),  .EBN0_DB(2.6), .LABEL("R=3/4 (6,3) 65538"))
    u2 (.clk, .go(go[2]), .fin(fin[2]), .checks(c[2]), .failures(f[2]), .raw_errors(raw[2]), .bit_errors(be[2]));
  tb_codec_case #(.K(2428), .JE(9), .JF(18), .EBN0_DB(4.2), .LABEL("R=9/10 (9,18) 65556"))
    u3 (.clk, .go(go[3]), .fin(fin[3]), .checks(c[3]), .failures(f[3]), .raw_errors(raw[3]), .bit_errors(be[3]));

  initial begin
    repeat (3000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    void'($urandom(77));
    checks = 0; failures = 0;
    foreach (go[i]) go[i] = 0;
    for (int i = 0; i < NC; i++) begin
      go[i] = 1;
      wait (fin[i]);
      checks += c[i] + 1;
      failures += f[i];
      if (raw[i] == 0) failures++;   // the channel must have made errors
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
