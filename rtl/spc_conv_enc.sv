// spc_conv_enc: SPC-convolutional encoder for one dimension m.
//
// The dimension's J = J_E + J_F rows of K information bits are read through
// interleaver pi_m: rows 0..J_E-1 form E, rows J_E..J-1 form F.
//   p_k  = parity of column k of E           (1st SPC encoder)
//   p'_k = parity output of C-hat driven by p (encoder of C-hat)
//   q_k  = parity of column k of F and p'_k  (2nd SPC encoder)
// Only q is output: p and p' are carried implicitly by E and by [F; q],
// so the dimension adds K redundant bits to J*K information bits.
// C-hat is terminated circularly, so the block is read twice: pass 1 (K
// cycles) finds the end state from state 0, then after one cycle that loads
// the circular state, pass 2 (K cycles) emits q_0..q_(K-1), one per cycle.
// This follows the document; the two-pass schedule is this design's.
//
// Interface: pulse `start` with the information block stable in the
// caller's buffer.  rd_addr[r] addresses the bit of row r in the current
// column; the buffer returns rd_bit[r] in the same cycle (combinational
// read).  q_valid/q_bit/q_col give q_k; `done` pulses after q_(K-1).
// Latency from start to done: 2K + 2 cycles.
module spc_conv_enc
  import spc_pkg::*;
#(
  parameter int unsigned K   = K_DEF,
  parameter int unsigned JE  = JE_DEF,
  parameter int unsigned JF  = JF_DEF,
  parameter int unsigned M   = M_DEF,
  parameter int unsigned DIM = 0,         // which interleaver pi_m this encoder uses
  localparam int unsigned J  = JE + JF,
  localparam int unsigned AW = $clog2(J * K),
  localparam int unsigned KW = $clog2(K),
  localparam int unsigned DW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] rd_addr [J],
  input  logic          rd_bit  [J],
  output logic          q_valid,
  output logic          q_bit,
  output logic [KW-1:0] q_col,
  output logic          busy,
  output logic          done
);
  typedef enum logic [2:0] {IDLE, PASS1, CIRC, PASS2, FIN} st_t;
  st_t st;

  logic il_init, il_step;
  logic [KW-1:0] col;
  logic rsc_clear, rsc_circ, rsc_en, p_bit, pp_bit, f_par;

  spc_interleaver #(.K(K), .JE(JE), .JF(JF), .M(M)) u_il (
    .clk, .rst_n, .dim(DW'(DIM)),
    .init_fwd(il_init), .init_bwd(1'b0), .step_fwd(il_step), .step_bwd(1'b0),
    .addr(rd_addr), .col(col)
  );

  spc_rsc_enc #(.K(K)) u_rsc (
    .clk, .rst_n, .clear(rsc_clear), .load_circ(rsc_circ), .en(rsc_en),
    .u(p_bit), .p(pp_bit), .state()
  );

  always_comb begin
    p_bit = 1'b0;
    for (int r = 0; r < JE; r++) p_bit ^= rd_bit[r];
    f_par = 1'b0;
    for (int r = JE; r < J; r++) f_par ^= rd_bit[r];
  end

  wire last = (col == KW'(K - 1));

  always_comb begin
    il_init   = 1'b0;
    il_step   = 1'b0;
    rsc_clear = 1'b0;
    rsc_circ  = 1'b0;
    rsc_en    = 1'b0;
    case (st)
      IDLE:  if (start) begin il_init = 1'b1; rsc_clear = 1'b1; end
      PASS1: begin rsc_en = 1'b1; if (last) il_init = 1'b1; else il_step = 1'b1; end
      CIRC:  rsc_circ = 1'b1;
      PASS2: begin rsc_en = 1'b1; il_step = !last; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= IDLE;
    else case (st)
      IDLE:    if (start) st <= PASS1;
      PASS1:   if (last) st <= CIRC;
      CIRC:    st <= PASS2;
      PASS2:   if (last) st <= FIN;
      default: st <= IDLE;
    endcase
  end

  assign q_valid = (st == PASS2);
  assign q_bit   = f_par ^ pp_bit;
  assign q_col   = col;
  assign busy    = (st != IDLE);
  assign done    = (st == FIN);
endmodule
