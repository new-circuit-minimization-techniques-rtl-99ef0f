// aes_mix_columns: AES MixColumns on a 128-bit state.
//
// Each column (a0..a3) is multiplied by the circulant matrix (2 3 1 1) over
// GF(2^8)/0x11B:  b_r = 2*a_r + 3*a_(r+1) + a_(r+2) + a_(r+3).
// Written with the usual xtime (multiply-by-2) formulation; a minimised XOR
// network for this matrix is left to synthesis. Byte order as in
// aes_shift_rows. Combinational.
module aes_mix_columns (
  input  logic [127:0] s_in,
  output logic [127:0] s_out
);
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  logic [7:0] a [4];

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = s_in[127 - 8*(4*c + r) -: 8];
      for (int r = 0; r < 4; r++)
        s_out[127 - 8*(4*c + r) -: 8] = xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4]
                                      ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
  end
endmodule
