// spc_rsc_enc: encoder of C-hat, the 4-state recursive systematic
// convolutional code (1+x)/(1+x+x^2) that links the columns of an
// SPC-convolutional code.  Each input bit u (a column parity p_k) gives the
// parity bit p' = par(state, u) at once (combinational) and advances the
// state on the clock when `en` is high.
//
// Circular (tail-biting) termination: the block is encoded twice.  The first
// pass starts from state 0 (`clear`) and ends in state S0.  `load_circ` then
// sets the circular state Sc = (I + A^K)^-1 * S0, where A is the zero-input
// state transition; the second pass from Sc ends again in Sc.  A has period 3
// over GF(2), so Sc = A*S0 when K mod 3 = 1 and Sc = A^2*S0 when K mod 3 = 2;
// K mod 3 = 0 has no circular state.  The document states that circular
// termination is used; the two-pass procedure is the standard way to do it.
//
// Timing: one bit per cycle; clear and load_circ take one cycle each.
module spc_rsc_enc
  import spc_pkg::*;
#(
  parameter int unsigned K = K_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,      // state := 0
  input  logic       load_circ,  // state := circular state from the end state of pass 1
  input  logic       en,         // encode u
  input  logic       u,
  output logic       p,          // parity bit p' for u
  output logic [1:0] state
);
  // zero-input transition A: {s1, s2} -> {s1 ^ s2, s1}
  function automatic logic [1:0] zstep(input logic [1:0] s);
    return rsc_next(s, 1'b0);
  endfunction

  assign p = rsc_par(state, u);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= '0;
    else if (clear)     state <= '0;
    else if (load_circ) state <= (K % 3 == 1) ? zstep(state) : zstep(zstep(state));
    else if (en)        state <= rsc_next(state, u);
  end

  initial begin
    assert (K % 3 != 0)
      else $error("K must not be a multiple of 3: no circular state exists for C-hat");
  end
endmodule
