// spc_col_app: soft decoding of one column of an SPC-convolutional codeword,
// Steps 1 and 3 of the local APP decoder.
//
// A column holds R bits whose parity is the column parity bit alpha, a bit
// of the convolutional code C-hat that is never transmitted.
//   Step 1: plr = f(...f(f(l[0], l[1]), l[2])..., l[R-1]), the LR that the
//           column has even parity, i.e. the a priori LR of alpha for the
//           decoder of C-hat (forward recursion f_j).
//   Step 3: given the extrinsic LR a_ext of alpha found by that decoder, a
//           backward recursion e_j = f(e_(j+1), l[j]) starting from a_ext
//           gives, for every bit j, its extrinsic LR
//           ext[j] = f(f_(j-1), e_(j+1)): the parity LR of all the other
//           bits of the column together with alpha.
// The document's recursions are followed as written; values are LLRs
// (spc_pkg) and f is spc_fbox.  With R = 1 the column is a single bit:
// plr = l[0] and ext[0] = a_ext.
//
// Purely combinational; uses 3(R-1) f-functions.
module spc_col_app
  import spc_pkg::*;
#(
  parameter int unsigned R = 2   // bits in the column (J_E for E, J_F+1 for F and q)
) (
  input  llr_t l     [R],   // a priori LLRs of the column's bits
  input  llr_t a_ext,       // extrinsic LLR of the column parity (Step 2 result)
  output llr_t plr,         // Step 1: LLR of even column parity
  output llr_t ext   [R]    // Step 3: extrinsic LLR of each bit
);
  llr_t fw [R];     // fw[j] = parity LLR of l[0..j]
  llr_t bw [R+1];   // bw[j] = parity LLR of l[j..R-1] and alpha

  assign fw[0] = l[0];
  assign bw[R] = a_ext;

  for (genvar j = 1; j < R; j++) begin : g_fw
    spc_fbox u_f (.a(fw[j-1]), .b(l[j]), .f(fw[j]));
  end
  for (genvar j = 1; j < R; j++) begin : g_bw
    spc_fbox u_e (.a(bw[j+1]), .b(l[j]), .f(bw[j]));
  end
  // bw[0] is not needed
  assign bw[0] = '0;

  assign plr    = fw[R-1];
  assign ext[0] = bw[1];
  for (genvar j = 1; j < R; j++) begin : g_ext
    spc_fbox u_x (.a(fw[j-1]), .b(bw[j+1]), .f(ext[j]));
  end
endmodule
