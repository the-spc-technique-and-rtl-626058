// spc_turbo_enc: encoder of the M-dimensional SPC-turbo code.
//
// The information block D of N = J*K bits is interleaved M times and each
// copy is encoded by an SPC-convolutional encoder (spc_conv_enc with its own
// pi_m).  The codeword is {D, q(1), ..., q(M)}: N information bits and M*K
// redundant bits, rate J/(J+M) (1/2 for the default J = 3, M = 3).  The M
// encoders run in parallel on one shared buffer of D, as drawn in the
// document; the buffer has M*J combinational read ports.
//
// Interface:
//   load:   while in_ready, each in_valid writes in_bit as the next bit of D
//           (bit 0 first); after N bits encoding starts by itself.
//   output: q_valid for K cycles, q_bits[m] = q(m+1)_k with k = q_col.
//           `done` pulses after the last column.  The systematic part of the
//           codeword is D itself, as loaded.
// Timing: N load cycles, then 2K + 2 cycles to done.  in_ready is low from
// the last load until done.
module spc_turbo_enc
  import spc_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int unsigned JE = JE_DEF,
  parameter int unsigned JF = JF_DEF,
  parameter int unsigned M  = M_DEF,
  localparam int unsigned J  = JE + JF,
  localparam int unsigned N  = J * K,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned KW = $clog2(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_bit,
  output logic          in_ready,
  output logic          q_valid,
  output logic          q_bits [M],
  output logic [KW-1:0] q_col,
  output logic          done
);
  logic          dbuf [N];
  logic [AW-1:0] wptr;
  logic          loading, start;

  logic [AW-1:0] rd_addr [M][J];
  logic          rd_bit  [M][J];
  logic          qv [M];
  logic [KW-1:0] qc [M];
  logic          dn [M];
  logic          bz [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      loading <= 1'b1;
      start   <= 1'b0;
    end else begin
      start <= 1'b0;
      if (loading && in_valid) begin
        if (wptr == AW'(N - 1)) begin
          wptr    <= '0;
          loading <= 1'b0;
          start   <= 1'b1;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end else if (!loading && dn[0]) begin
        loading <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (loading && in_valid) dbuf[wptr] <= in_bit;

  for (genvar m = 0; m < M; m++) begin : g_enc
    spc_conv_enc #(.K(K), .JE(JE), .JF(JF), .M(M), .DIM(m)) u_enc (
      .clk, .rst_n, .start,
      .rd_addr(rd_addr[m]), .rd_bit(rd_bit[m]),
      .q_valid(qv[m]), .q_bit(q_bits[m]), .q_col(qc[m]),
      .busy(bz[m]), .done(dn[m])
    );
    always_comb
      for (int r = 0; r < J; r++) rd_bit[m][r] = dbuf[rd_addr[m][r]];
  end

  assign in_ready = loading;
  assign q_valid  = qv[0];
  assign q_col    = qc[0];
  assign done     = dn[0];

  // the M encoders run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    qv[M-1] == qv[0] && bz[M-1] == bz[0]);
endmodule
