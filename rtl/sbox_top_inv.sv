// sbox_top_inv: inverse top affine layer of the combined AES SBox.
//
// The inverse SBox is InvSBox(U) = V^-1 with V = A^-1*(U + 0x63), A the AES
// affine matrix. This layer forms, for W = ALPHA * V^(2^FROB), the same
// signals the forward layer forms: q (18 forms for Mul-Sum) and l (32 bits,
// the vectors whose Y-weighted sum is V^-1 in polynomial coordinates, with no
// affine map at the output). V is an affine function of U, so each bit is the
// parity of a masked U plus a constant bit (A^-1 * 0x63 = 0x05 folded in).
// The rows are computed at elaboration by sbox_pkg::top_rows().
// Purely combinational.
module sbox_top_inv
  import sbox_pkg::*;
#(
  parameter byte_t       ALPHA = 8'h01,  // 1..255
  parameter int unsigned FROB  = 0       // 0..7
) (
  input  byte_t  u,
  output q_vec_t q,
  output l_vec_t l
);
  localparam top_rows_t R = top_rows(SBOX_INV, ALPHA, FROB);

  if (ALPHA == 8'h00 || FROB > 7) begin : g_bad_param
    $error("sbox_top_inv: ALPHA must be 1..255 and FROB 0..7");
  end

  always_comb begin
    for (int k = 0; k < QW; k++) q[k] = ^(u & R.q_row[k]) ^ R.q_c[k];
    for (int k = 0; k < LW; k++) l[k] = ^(u & R.l_row[k]) ^ R.l_c[k];
  end
endmodule
