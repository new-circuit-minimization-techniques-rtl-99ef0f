// sbox_mulsum: the nonlinear "Mul-Sum" stage, Q (18 bits) -> X (4 bits).
//
// X = U^17, the product of the input with its conjugate U^16, lies in
// GF(2^4). It is formed from nine 2-input gates on the pairs (q[2j], q[2j+1]):
// an AND for a product term, an XOR for a linear term, and an OR where a pair
// gives both (a|b = ab + a + b). Each X bit is the XOR of the gates its rows
// in sbox_pkg select. The 18-bit Q and the 4-bit X are the architecture's;
// the pairing (a Karatsuba multiplier over GF(4)) is this design's own.
// Depth: one AND/OR level plus an XOR tree of at most six inputs.
// Purely combinational.
module sbox_mulsum
  import sbox_pkg::*;
(
  input  q_vec_t q,
  output gf16_t  x
);
  logic [NPAIRS-1:0] prod, psum;

  always_comb begin
    for (int j = 0; j < NPAIRS; j++) begin
      prod[j] = q[2*j] & q[2*j+1];
      psum[j] = q[2*j] ^ q[2*j+1];
    end
    for (int k = 0; k < 4; k++)
      x[k] = ^(prod & MS_AND[k]) ^ ^(psum & MS_XOR[k]);
  end
endmodule
