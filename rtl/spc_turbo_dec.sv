// spc_turbo_dec: iterative decoder of the M-dimensional SPC-turbo code.
//
// The M local APP decoders DEC-1..DEC-M of the decoding loop are one
// spc_app_dec used M times in turn: each takes the posterior LLRs left by
// the previous one as its input, divides out (subtracts) the extrinsic LLRs
// it stored one iteration earlier, decodes its dimension and overwrites the
// posteriors.  The memories are:
//   post  [N]    posterior LLR of every information bit (the loop variable
//                L; it is loaded with the channel LLRs, which is the input
//                position of the loop's switch),
//   extm  [M][N] extrinsic LLR E(m) of every bit from every dimension (the
//                one-iteration delay T), cleared to 0 (LR 1) on load,
//   lq    [M][K] channel LLRs of the redundant bits q(m).
// The loop structure follows the document.  Time-sharing one local decoder
// and the memory organisation are this design's choices.
//
// Interface:
//   load (while not busy): ld_valid with ld_sel = 0 writes channel LLR
//     ld_llr of information bit ld_addr (and clears its extrinsic values);
//     ld_sel = m (1..M) writes the LLR of q(m)_k with k = ld_addr.
//   start with n_iter (>= 1) iterations; done pulses at the end.
//   rd_addr -> rd_llr (posterior LLR, POST_W bits) and rd_bit (hard decision,
//     1 when the LLR is negative), combinational.
// Timing: an iteration takes M * (2K + 2) cycles; done is high
// 1 + n_iter * M * (2K + 2) cycles after the cycle of start (n_iter = 0:
// one cycle, nothing changes).
module spc_turbo_dec
  import spc_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int unsigned JE = JE_DEF,
  parameter int unsigned JF = JF_DEF,
  parameter int unsigned M  = M_DEF,
  parameter int unsigned IW = 6,      // width of the iteration count
  localparam int unsigned J  = JE + JF,
  localparam int unsigned N  = J * K,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned KW = $clog2(K),
  localparam int unsigned DW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned SW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_valid,
  input  logic [SW-1:0] ld_sel,
  input  logic [AW-1:0] ld_addr,
  input  llr_t          ld_llr,
  input  logic          start,
  input  logic [IW-1:0] n_iter,
  output logic          busy,
  output logic          done,
  input  logic [AW-1:0] rd_addr,
  output post_t         rd_llr,
  output logic          rd_bit
);
  post_t post [N];
  llr_t extm [M][N];
  llr_t lq   [M][K];

  typedef enum logic [1:0] {IDLE, RUN, WAIT, FIN} st_t;
  st_t st;
  logic [IW-1:0] it;
  logic [DW-1:0] dim;
  logic app_start, app_done, app_busy, app_init, app_wr;

  logic [AW-1:0] a_addr [J];
  post_t         a_post [J];
  llr_t          a_ext  [J];
  logic [KW-1:0] a_qcol;
  llr_t          a_lq;
  post_t         w_post [J];
  llr_t          w_ext  [J];

  spc_app_dec #(.K(K), .JE(JE), .JF(JF), .M(M)) u_app (
    .clk, .rst_n, .init(app_init), .start(app_start), .dim,
    .busy(app_busy), .done(app_done),
    .rd_addr(a_addr), .rd_post(a_post), .rd_ext(a_ext),
    .q_col(a_qcol), .rd_lq(a_lq),
    .wr_en(app_wr), .wr_post(w_post), .wr_ext(w_ext)
  );

  always_comb begin
    for (int r = 0; r < J; r++) begin
      a_post[r] = post[a_addr[r]];
      a_ext[r]  = extm[dim][a_addr[r]];
    end
    a_lq = lq[dim][a_qcol];
  end

  // ---- memories -----------------------------------------------------------
  wire ld = ld_valid && (st == IDLE);

  always_ff @(posedge clk) begin
    if (ld) begin
      if (ld_sel == '0) begin
        post[ld_addr] <= post_t'(ld_llr);
        for (int m = 0; m < M; m++) extm[m][ld_addr] <= '0;
      end else begin
        lq[DW'(ld_sel - 1'b1)][KW'(ld_addr)] <= ld_llr;
      end
    end else if (app_wr) begin
      for (int r = 0; r < J; r++) begin
        post[a_addr[r]]      <= w_post[r];
        extm[dim][a_addr[r]] <= w_ext[r];
      end
    end
  end

  // ---- iteration / dimension loop -----------------------------------------
  logic loaded;   // a block was loaded since the last decoding
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= IDLE;
      it     <= '0;
      dim    <= '0;
      loaded <= 1'b1;
    end else begin
      if (ld) loaded <= 1'b1;
      case (st)
        IDLE: if (start) begin
          it  <= '0;
          dim <= '0;
          st  <= (n_iter == '0) ? FIN : RUN;
        end
        RUN: begin
          loaded <= 1'b0;
          st     <= WAIT;
        end
        WAIT: if (app_done) begin
          if (dim == DW'(M - 1)) begin
            dim <= '0;
            if (it == n_iter - 1'b1) st <= FIN;
            else begin
              it <= it + 1'b1;
              st <= RUN;
            end
          end else begin
            dim <= dim + 1'b1;
            st  <= RUN;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign app_start = (st == RUN);
  assign app_init  = (st == RUN) && loaded;
  assign busy      = (st != IDLE);
  assign done      = (st == FIN);
  assign rd_llr    = post[rd_addr];
  assign rd_bit    = rd_llr[POST_W-1];

  a_app_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (st == RUN) |-> !app_busy);
endmodule
