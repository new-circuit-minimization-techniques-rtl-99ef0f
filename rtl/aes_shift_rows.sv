// aes_shift_rows: AES ShiftRows on a 128-bit state (wiring only).
//
// The state is held column-major: byte b (b = 0..15) occupies bits
// [127-8b -: 8] and sits in row b%4, column b/4. Row r is rotated left by r
// byte positions: out[r][c] = in[r][(c+r) mod 4]. Combinational.
module aes_shift_rows (
  input  logic [127:0] s_in,
  output logic [127:0] s_out
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s_out[127 - 8*(4*c + r) -: 8] = s_in[127 - 8*(4*((c + r) % 4) + r) -: 8];
  end
endmodule
