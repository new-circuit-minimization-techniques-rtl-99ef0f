// sbox_top_fmux: top layer of the combined SBox with floating multiplexers.
//
// Each output bit of the combined top layer is MUX(fwd, F*U, I*U + c), F and
// I being the forward and inverse rows. The inputs both rows share are summed
// once outside the multiplexer:
//   out = A*U + MUX(fwd, B*U, C*U + c),  A = F & I, B = F & ~I, C = I & ~F
// which is the "Y = MUX(select, X_1, X_2) + X_0" rewrite, with the shift
// Delta taken as zero (choosing Delta per row is a gate-count optimisation this
// design does not attempt). Both directions take their own additional
// transformation (ALPHA_F, FROB_F) and (ALPHA_I, FROB_I). fwd = 1 gives the
// forward rows. Purely combinational; one multiplexer per output bit.
module sbox_top_fmux
  import sbox_pkg::*;
#(
  parameter byte_t       ALPHA_F = 8'h01,
  parameter int unsigned FROB_F  = 0,
  parameter byte_t       ALPHA_I = 8'h01,
  parameter int unsigned FROB_I  = 0
) (
  input  byte_t     u,
  input  sbox_dir_e fwd,
  output q_vec_t    q,
  output l_vec_t    l
);
  localparam top_rows_t RF = top_rows(SBOX_FWD, ALPHA_F, FROB_F);
  localparam top_rows_t RI = top_rows(SBOX_INV, ALPHA_I, FROB_I);

  if (ALPHA_F == 8'h00 || ALPHA_I == 8'h00 || FROB_F > 7 || FROB_I > 7) begin : g_bad_param
    $error("sbox_top_fmux: ALPHA_* must be 1..255 and FROB_* 0..7");
  end

  function automatic logic fmux_bit(input byte_t u_in, input logic sel_f,
                                    input byte_t f, input logic cf,
                                    input byte_t i, input logic ci);
    logic common, only_f, only_i;
    common = ^(u_in & f & i);
    only_f = ^(u_in & f & ~i) ^ cf;
    only_i = ^(u_in & i & ~f) ^ ci;
    return common ^ (sel_f ? only_f : only_i);
  endfunction

  always_comb begin
    for (int k = 0; k < QW; k++)
      q[k] = fmux_bit(u, fwd == SBOX_FWD, RF.q_row[k], RF.q_c[k], RI.q_row[k], RI.q_c[k]);
    for (int k = 0; k < LW; k++)
      l[k] = fmux_bit(u, fwd == SBOX_FWD, RF.l_row[k], RF.l_c[k], RI.l_row[k], RI.l_c[k]);
  end
endmodule
