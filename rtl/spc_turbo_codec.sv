// spc_turbo_codec: SPC-turbo codec, the encoder and the iterative decoder of
// one SPC-turbo code, side by side.
//
// An SPC-turbo code replaces the puncturing of a turbo code by single parity
// checks: each of M dimensions arranges the interleaved information block as
// a J x K array, sums each column to one parity bit, and codes only the K
// column parities with a short 4-state convolutional code, so the trellis of
// all dimensions together is only M*K = (1/R - 1)*J*K sections long.  The
// defaults are the main configuration: M = 3, (J_E, J_F) = (2, 1), rate 1/2,
// 65535 information bits.
//
// The encoder (spc_turbo_enc) takes the information bits one per cycle and
// returns the M redundant bits of each column.  The channel lies outside:
// the decoder (spc_turbo_dec) is loaded with channel LLRs of the information
// bits and of the redundant bits, iterates n_iter times and is read out bit
// by bit.  All ports are those of the two blocks, prefixed enc_ and dec_;
// see those modules for the protocols and timing.
module spc_turbo_codec
  import spc_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int unsigned JE = JE_DEF,
  parameter int unsigned JF = JF_DEF,
  parameter int unsigned M  = M_DEF,
  parameter int unsigned IW = 6,
  localparam int unsigned J  = JE + JF,
  localparam int unsigned N  = J * K,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned KW = $clog2(K),
  localparam int unsigned SW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // encoder
  input  logic          enc_in_valid,
  input  logic          enc_in_bit,
  output logic          enc_in_ready,
  output logic          enc_q_valid,
  output logic          enc_q_bits [M],
  output logic [KW-1:0] enc_q_col,
  output logic          enc_done,
  // decoder
  input  logic          dec_ld_valid,
  input  logic [SW-1:0] dec_ld_sel,
  input  logic [AW-1:0] dec_ld_addr,
  input  llr_t          dec_ld_llr,
  input  logic          dec_start,
  input  logic [IW-1:0] dec_n_iter,
  output logic          dec_busy,
  output logic          dec_done,
  input  logic [AW-1:0] dec_rd_addr,
  output post_t         dec_rd_llr,
  output logic          dec_rd_bit
);
  spc_turbo_enc #(.K(K), .JE(JE), .JF(JF), .M(M)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_bit(enc_in_bit), .in_ready(enc_in_ready),
    .q_valid(enc_q_valid), .q_bits(enc_q_bits), .q_col(enc_q_col), .done(enc_done)
  );

  spc_turbo_dec #(.K(K), .JE(JE), .JF(JF), .M(M), .IW(IW)) u_dec (
    .clk, .rst_n,
    .ld_valid(dec_ld_valid), .ld_sel(dec_ld_sel), .ld_addr(dec_ld_addr), .ld_llr(dec_ld_llr),
    .start(dec_start), .n_iter(dec_n_iter), .busy(dec_busy), .done(dec_done),
    .rd_addr(dec_rd_addr), .rd_llr(dec_rd_llr), .rd_bit(dec_rd_bit)
  );
endmodule
