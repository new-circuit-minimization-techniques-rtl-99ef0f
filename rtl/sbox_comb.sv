// sbox_comb: combined forward/inverse AES SBox sharing the nonlinear middle.
//
// The top layer delivers (Q, L) for the selected direction; the shared
// Mul-Sum, GF(2^4) inverse and NAND/XOR output layer follow. Because L
// already contains the bottom matrix of each direction, the second
// multiplexer of the classic combined SBox reduces to the multiplexer on L
// plus the choice of the output constant (0x63 forward, 0x00 inverse).
// FLOATING_MUX = 1 (default) builds the top layer with floating multiplexers
// (sbox_top_fmux: shared inputs summed outside the multiplexer);
// FLOATING_MUX = 0 builds it literally as Top Forward, Top Inverse and a
// 50-bit multiplexer. Both give the same function. fwd = SBOX_FWD selects
// SBox, SBOX_INV selects InvSBox (polarity is this design's choice).
// Combinational.
module sbox_comb
  import sbox_pkg::*;
#(
  parameter bit          FLOATING_MUX = 1'b1,
  parameter byte_t       ALPHA_F      = 8'h01,
  parameter int unsigned FROB_F       = 0,
  parameter byte_t       ALPHA_I      = 8'h01,
  parameter int unsigned FROB_I       = 0
) (
  input  byte_t     u,
  input  sbox_dir_e fwd,
  output byte_t     r
);
  q_vec_t q;
  l_vec_t l;
  gf16_t  x, y;
  byte_t  c;

  if (FLOATING_MUX) begin : g_fmux
    sbox_top_fmux #(.ALPHA_F(ALPHA_F), .FROB_F(FROB_F), .ALPHA_I(ALPHA_I), .FROB_I(FROB_I))
      u_top (.u(u), .fwd(fwd), .q(q), .l(l));
  end else begin : g_two_tops
    q_vec_t q_f, q_i;
    l_vec_t l_f, l_i;
    sbox_top_fwd #(.ALPHA(ALPHA_F), .FROB(FROB_F)) u_top_f (.u(u), .q(q_f), .l(l_f));
    sbox_top_inv #(.ALPHA(ALPHA_I), .FROB(FROB_I)) u_top_i (.u(u), .q(q_i), .l(l_i));
    always_comb begin
      q = (fwd == SBOX_FWD) ? q_f : q_i;
      l = (fwd == SBOX_FWD) ? l_f : l_i;
    end
  end

  always_comb c = (fwd == SBOX_FWD) ? AES_B : 8'h00;

  sbox_mulsum u_ms  (.q(q), .x(x));
  gf16_inv    u_inv (.x(x), .y(y));
  sbox_bottom u_bot (.y(y), .l(l), .c(c), .r(r));
endmodule
