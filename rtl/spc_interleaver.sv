// spc_interleaver: address generator of the interleavers pi_1..pi_M.
//
// In dimension m the information block D (N = J*K bits) is laid out as a
// J x K array whose first J_E rows form E and whose last J_F rows form F.
// Row r, column k of dimension m holds information bit
//   pi_m(r, k) = G(m, r) * K + ((A(m, r) * k + B(m, r)) mod K),
// where G picks one of the J groups of K consecutive bits, A is a step
// coprime with K and B an offset (il_group, il_mult, il_off in spc_pkg).
// G is chosen so that the F rows of the M dimensions read disjoint groups:
// with (J_E, J_F) = (2, 1) and M = 3 every bit is read once in F and twice
// in E over the three dimensions, the grouping rule of the document.  The
// document's interleavers are random apart from that rule; the
// linear-congruential rows here are this design's choice, made so that the
// addresses can be stepped with one adder per row instead of a table.
//
// Interface: `dim` selects m (it must stay constant while stepping).
// init_fwd sets column 0, init_bwd column K-1; step_fwd/step_bwd move one
// column up/down.  addr[r] and col are registered: they are valid the cycle
// after the command and hold until the next one.
module spc_interleaver
  import spc_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int unsigned JE = JE_DEF,
  parameter int unsigned JF = JF_DEF,
  parameter int unsigned M  = M_DEF,
  localparam int unsigned J  = JE + JF,
  localparam int unsigned AW = $clog2(J * K),
  localparam int unsigned KW = $clog2(K),
  localparam int unsigned DW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] dim,
  input  logic          init_fwd,
  input  logic          init_bwd,
  input  logic          step_fwd,
  input  logic          step_bwd,
  output logic [AW-1:0] addr [J],
  output logic [KW-1:0] col
);
  logic [KW-1:0] step_t [M][J];   // A(m,r)
  logic [KW-1:0] off_t  [M][J];   // B(m,r)
  logic [KW-1:0] last_t [M][J];   // A*(K-1)+B mod K = (B - A) mod K
  logic [AW-1:0] base_t [M][J];   // G(m,r)*K

  for (genvar m = 0; m < M; m++) begin : g_m
    for (genvar r = 0; r < J; r++) begin : g_r
      localparam int unsigned A = il_mult(m, r, J, K);
      localparam int unsigned B = il_off(m, r, K);
      localparam int unsigned G = il_group(m, r, JE, JF);
      assign step_t[m][r] = KW'(A);
      assign off_t[m][r]  = KW'(B);
      assign last_t[m][r] = KW'((B + K - A) % K);
      assign base_t[m][r] = AW'(G * K);
    end
  end

  logic [KW-1:0] pos [J];
  logic [KW-1:0] pos_up [J];   // pos + A mod K
  logic [KW-1:0] pos_dn [J];   // pos - A mod K

  always_comb
    for (int r = 0; r < J; r++) begin
      logic [KW:0] nx;
      nx = {1'b0, pos[r]} + {1'b0, step_t[dim][r]};
      pos_up[r] = (nx >= (KW+1)'(K)) ? KW'(nx - (KW+1)'(K)) : KW'(nx);
      pos_dn[r] = (pos[r] >= step_t[dim][r])
                ? pos[r] - step_t[dim][r]
                : KW'((KW+1)'(pos[r]) + (KW+1)'(K) - (KW+1)'(step_t[dim][r]));
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < J; r++) pos[r] <= '0;
      col <= '0;
    end else if (init_fwd) begin
      for (int r = 0; r < J; r++) pos[r] <= off_t[dim][r];
      col <= '0;
    end else if (init_bwd) begin
      for (int r = 0; r < J; r++) pos[r] <= last_t[dim][r];
      col <= KW'(K - 1);
    end else if (step_fwd) begin
      pos <= pos_up;
      col <= col + 1'b1;
    end else if (step_bwd) begin
      pos <= pos_dn;
      col <= col - 1'b1;
    end
  end

  always_comb
    for (int r = 0; r < J; r++) addr[r] = base_t[dim][r] + AW'(pos[r]);

  initial begin
    assert (K % 3 != 0)
      else $error("K must not be a multiple of 3: no circular state exists for C-hat");
  end
endmodule
