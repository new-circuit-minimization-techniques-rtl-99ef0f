// sbox_top_fwd: forward top linear layer of the low-depth AES SBox.
//
// From the input byte U it forms, with XOR trees only,
//   q : the 18 linear forms whose nine pairwise products Mul-Sum needs, and
//   l : the 32 bits of M_0*U .. M_3*U, the four vectors the output layer
//       gates with Y_0..Y_3 (they contain the AES affine matrix).
// Collecting the linear work of the base conversion, of the multiplications
// and of the output back-conversion into one layer is the architecture's
// idea. ALPHA and FROB select one of the 255 x 8 additional transformations
// W = ALPHA * U^(2^FROB) that lead to the same SBox with different matrices;
// the default (1, 0) is the plain one. The rows are computed at elaboration
// by sbox_pkg::top_rows(); each output bit is the parity of the input bits its
// row selects, and XOR sharing between rows is left to synthesis.
// Purely combinational.
module sbox_top_fwd
  import sbox_pkg::*;
#(
  parameter byte_t       ALPHA = 8'h01,  // 1..255
  parameter int unsigned FROB  = 0       // 0..7
) (
  input  byte_t  u,
  output q_vec_t q,
  output l_vec_t l
);
  localparam top_rows_t R = top_rows(SBOX_FWD, ALPHA, FROB);

  if (ALPHA == 8'h00 || FROB > 7) begin : g_bad_param
    $error("sbox_top_fwd: ALPHA must be 1..255 and FROB 0..7");
  end

  always_comb begin
    for (int k = 0; k < QW; k++) q[k] = ^(u & R.q_row[k]) ^ R.q_c[k];
    for (int k = 0; k < LW; k++) l[k] = ^(u & R.l_row[k]) ^ R.l_c[k];
  end
endmodule
