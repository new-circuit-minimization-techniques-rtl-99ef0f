// aes_sub_bytes: AES SubBytes, NBYTES forward SBoxes side by side.
//
// Each byte of the state goes through its own low-depth SBox (sbox_fwd); a
// full AES round needs 16 of them. Combinational.
module aes_sub_bytes #(
  parameter int unsigned NBYTES = 16
) (
  input  logic [8*NBYTES-1:0] s_in,
  output logic [8*NBYTES-1:0] s_out
);
  for (genvar b = 0; b < NBYTES; b++) begin : g_sbox
    sbox_fwd u_sbox (.u(s_in[8*b +: 8]), .r(s_out[8*b +: 8]));
  end
endmodule
