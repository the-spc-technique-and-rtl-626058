// spc_app_dec: local APP decoder of one dimension of the SPC-turbo code
// (one DEC-m of the iterative decoder), time-shared by all M dimensions.
//
// For dimension m it makes one pass over the K columns of the code and then
// one pass back, one column per cycle:
//   - division: the a priori LLR of each information bit is the current
//     posterior minus the extrinsic value this dimension produced in the
//     previous iteration (a division of LRs), so a dimension does not feed
//     its own output back to itself;
//   - Step 1 (both passes): column parities give the a priori LLRs of p_k
//     (E column) and p'_k (F column with q_k), via spc_col_app;
//   - Step 2: MAP decoding of C-hat with spc_map_section.  The forward pass
//     stores alpha_k of every column (K x 4 metrics, the decoder's main
//     storage); the backward pass runs beta and forms the extrinsic LLRs of
//     p_k and p'_k;
//   - Step 3 (backward pass): each information bit gets its extrinsic LLR
//     from its column and the extrinsic LLR of the column parity, and the new
//     posterior = a priori + extrinsic and the new extrinsic are written back.
// Steps 1-3 follow the document.  Recomputing Step 1 in the backward pass
// instead of storing it, and the treatment of the circular trellis, are this
// design's choices: the start metrics of a pass are the end metrics the same
// dimension reached in the previous iteration (alpha_K becomes alpha_0,
// beta_0 becomes beta_K); `init` resets them to zero (all states equally
// likely) for a new block.
//
// Memory interface (the memories live in spc_turbo_dec): rd_addr[r] is the
// information bit of row r of the current column, rd_post/rd_ext must return
// its posterior and this dimension's stored extrinsic LLR in the same cycle,
// and rd_lq the channel LLR of q_col.  In the backward pass wr_en is high and
// wr_post/wr_ext are to be written back at rd_addr at the clock edge.
// Timing: `start` is taken while busy is low; `done` is high for one cycle
// 2K + 1 cycles after the cycle of `start`, and busy falls one cycle later.
module spc_app_dec
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
  input  logic          init,      // new block: clear the saved boundary metrics
  input  logic          start,
  input  logic [DW-1:0] dim,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] rd_addr [J],
  input  post_t         rd_post [J],
  input  llr_t          rd_ext  [J],
  output logic [KW-1:0] q_col,
  input  llr_t          rd_lq,
  output logic          wr_en,
  output post_t         wr_post [J],
  output llr_t          wr_ext  [J]
);
  typedef enum logic [1:0] {IDLE, FWD, BWD, FIN} st_t;
  st_t st;

  logic il_init_f, il_init_b, il_step_f, il_step_b;
  logic [KW-1:0] col;

  spc_interleaver #(.K(K), .JE(JE), .JF(JF), .M(M)) u_il (
    .clk, .rst_n, .dim,
    .init_fwd(il_init_f), .init_bwd(il_init_b),
    .step_fwd(il_step_f), .step_bwd(il_step_b),
    .addr(rd_addr), .col
  );
  assign q_col = col;

  // ---- division: a priori = posterior / own previous extrinsic ----------
  logic signed [MET_W+1:0] apri_w [J];   // exact quotient
  llr_t apri [J];                         // saturated for the column units
  always_comb
    for (int r = 0; r < J; r++) begin
      apri_w[r] = (MET_W+2)'(rd_post[r]) - (MET_W+2)'(rd_ext[r]);
      apri[r]   = sat_llr(apri_w[r]);
    end

  // ---- Steps 1 and 3 on the E column and on the [F; q] column -----------
  llr_t le [JE];
  llr_t lf [JF+1];
  llr_t xe [JE];
  llr_t xf [JF+1];
  llr_t plr_e, plr_f, ext_p, ext_pp;

  always_comb begin
    for (int r = 0; r < JE; r++) le[r] = apri[r];
    for (int r = 0; r < JF; r++) lf[r] = apri[JE + r];
    lf[JF] = rd_lq;
  end

  spc_col_app #(.R(JE))   u_ce (.l(le), .a_ext(ext_p),  .plr(plr_e), .ext(xe));
  spc_col_app #(.R(JF+1)) u_cf (.l(lf), .a_ext(ext_pp), .plr(plr_f), .ext(xf));

  // ---- Step 2: one MAP trellis section of C-hat --------------------------
  met_t amem  [K][NSTATE];          // alpha_k of every column
  met_t a_cur [NSTATE];
  met_t b_cur [NSTATE];
  met_t a_bnd [M][NSTATE];          // saved circular boundary metrics
  met_t b_bnd [M][NSTATE];
  met_t a_in  [NSTATE];
  met_t a_out [NSTATE];
  met_t b_out [NSTATE];

  always_comb
    for (int s = 0; s < NSTATE; s++)
      a_in[s] = (st == BWD) ? amem[col][s] : a_cur[s];

  spc_map_section u_map (
    .alpha_in(a_in), .beta_in(b_cur), .lp(plr_e), .lpp(plr_f),
    .alpha_out(a_out), .beta_out(b_out), .ext_p, .ext_pp
  );

  // ---- write-back (Step 3 results) ---------------------------------------
  always_comb begin
    for (int r = 0; r < JE; r++) wr_ext[r] = xe[r];
    for (int r = 0; r < JF; r++) wr_ext[JE + r] = xf[r];
    for (int r = 0; r < J; r++)
      wr_post[r] = sat_post(apri_w[r] + (MET_W+2)'(wr_ext[r]));
  end
  assign wr_en = (st == BWD);

  // ---- control ------------------------------------------------------------
  wire last_f = (col == KW'(K - 1));
  wire last_b = (col == '0);

  always_comb begin
    il_init_f = 1'b0;
    il_init_b = 1'b0;
    il_step_f = 1'b0;
    il_step_b = 1'b0;
    case (st)
      IDLE: il_init_f = start;
      FWD:  if (last_f) il_init_b = 1'b1; else il_step_f = 1'b1;
      BWD:  il_step_b = !last_b;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE;
      for (int s = 0; s < NSTATE; s++) begin
        a_cur[s] <= '0;
        b_cur[s] <= '0;
      end
      for (int m = 0; m < M; m++)
        for (int s = 0; s < NSTATE; s++) begin
          a_bnd[m][s] <= '0;
          b_bnd[m][s] <= '0;
        end
    end else begin
      case (st)
        IDLE: begin
          if (init)
            for (int m = 0; m < M; m++)
              for (int s = 0; s < NSTATE; s++) begin
                a_bnd[m][s] <= '0;
                b_bnd[m][s] <= '0;
              end
          if (start) begin
            for (int s = 0; s < NSTATE; s++)
              a_cur[s] <= init ? '0 : a_bnd[dim][s];
            st <= FWD;
          end
        end
        FWD: begin
          a_cur <= a_out;
          if (last_f) begin
            a_bnd[dim] <= a_out;
            b_cur      <= b_bnd[dim];
            st         <= BWD;
          end
        end
        BWD: begin
          b_cur <= b_out;
          if (last_b) begin
            b_bnd[dim] <= b_out;
            st         <= FIN;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (st == FWD) amem[col] <= a_cur;

  assign busy = (st != IDLE);
  assign done = (st == FIN);
endmodule
