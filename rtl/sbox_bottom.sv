// sbox_bottom: output layer of the low-depth SBox (32 NAND2 + 8 XOR4).
//
// With L holding M_i*U for i = 0..3, the SBox output is
//   R_j = XOR_i ( Y_i AND L[8i+j] ) + c_j ,
// so the bottom linear matrix of the classic architecture disappears. The
// products are written as NAND gates as in the published gate count; in each
// 4-input XOR the four inversions cancel. The constant c (0x63 for the forward
// SBox, 0x00 for the inverse) cannot be folded into L, because Y = 0 for a zero
// field element; adding it as a separate input is this design's choice.
// Purely combinational, depth NAND2 + XOR4.
module sbox_bottom
  import sbox_pkg::*;
(
  input  gf16_t  y,
  input  l_vec_t l,
  input  byte_t  c,
  output byte_t  r
);
  logic [3:0] nd [8];

  always_comb begin
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 4; i++) nd[j][i] = ~(y[i] & l[8*i + j]);
      r[j] = ^nd[j] ^ c[j];
    end
  end
endmodule
