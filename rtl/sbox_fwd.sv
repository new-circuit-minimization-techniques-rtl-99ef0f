// sbox_fwd: forward AES SBox in the low-depth architecture ("architecture D").
//
//   u --top linear--> q (18) --Mul-Sum--> x (4) --GF(2^4) inverse--> y (4)
//   u --top linear--> l (32) ------------------------------------------+
//   y, l --32 NAND2 + 8 XOR4, + 0x63--> r
// The top layer computes Q and the four vectors M_i*U in parallel, so the
// critical path is top XORs, Mul-Sum, the 3-gate-deep inversion and the
// NAND/XOR4 layer; there is no bottom matrix after the inversion. ALPHA and
// FROB pick the additional transformation (see sbox_top_fwd); every choice
// gives the same function. Combinational: r = SBox(u) in the same cycle.
module sbox_fwd
  import sbox_pkg::*;
#(
  parameter byte_t       ALPHA = 8'h01,
  parameter int unsigned FROB  = 0
) (
  input  byte_t u,
  output byte_t r
);
  q_vec_t q;
  l_vec_t l;
  gf16_t  x, y;

  sbox_top_fwd #(.ALPHA(ALPHA), .FROB(FROB)) u_top (.u(u), .q(q), .l(l));
  sbox_mulsum u_ms  (.q(q), .x(x));
  gf16_inv    u_inv (.x(x), .y(y));
  sbox_bottom u_bot (.y(y), .l(l), .c(AES_B), .r(r));
endmodule
