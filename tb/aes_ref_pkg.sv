// aes_ref_pkg: reference model used by the testbenches.
//
// Computes everything from field arithmetic and does not share any matrix with
// the RTL: GF(2^8) multiplication modulo z^8+z^4+z^3+z+1, inversion as
// x^254, the AES affine map written with byte rotations, the AES-128 key
// expansion and a byte-array AES-128 encryption. Also maps a GF(2^4) element
// between the RTL's 4-bit coordinates (basis 0x0C, 0x51, 0xB0, 0xEC) and its
// GF(2^8) value.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 8'h00;
    logic [7:0] aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1B : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] gpow(input logic [7:0] a, input int e);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < e; i++) r = gmul(r, a);
    return r;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] a);
    return gpow(a, 254);
  endfunction

  function automatic logic [7:0] ref_rotl8(input logic [7:0] x, input int n);
    return 8'((x << n) | (x >> (8 - n)));
  endfunction

  // Linear part of the AES affine map.
  function automatic logic [7:0] aff_lin(input logic [7:0] x);
    return x ^ ref_rotl8(x, 1) ^ ref_rotl8(x, 2) ^ ref_rotl8(x, 3) ^ ref_rotl8(x, 4);
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return aff_lin(ginv(x)) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] y);
    for (int x = 0; x < 256; x++)
      if (sbox(8'(x)) == y) return 8'(x);
    return 8'h00;
  endfunction

  localparam logic [7:0] REF_BETA [4] = '{8'h0C, 8'h51, 8'hB0, 8'hEC};

  function automatic logic [7:0] gf16_val(input logic [3:0] c);
    logic [7:0] v = 8'h00;
    for (int i = 0; i < 4; i++) if (c[i]) v ^= REF_BETA[i];
    return v;
  endfunction

  // 4-bit coordinates of a GF(16) element; returns 4'hF plus a flag-free
  // search (the caller checks the element is in the subfield).
  function automatic logic [3:0] gf16_coord(input logic [7:0] v);
    for (int c = 0; c < 16; c++) if (gf16_val(4'(c)) == v) return 4'(c);
    return 4'h0;
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    logic [127:0] o;
    for (int b = 0; b < 16; b++) o[8*b +: 8] = sbox(s[8*b +: 8]);
    return o;
  endfunction

  // byte b of the state = bits [127-8b -: 8], row b%4, column b/4
  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [7:0] st [4][4];
    logic [127:0] o;
    for (int b = 0; b < 16; b++) st[b%4][b/4] = s[127-8*b -: 8];
    for (int b = 0; b < 16; b++) o[127-8*b -: 8] = st[b%4][((b/4) + (b%4)) % 4];
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127-32*c -: 8]; a1 = s[119-32*c -: 8];
      a2 = s[111-32*c -: 8]; a3 = s[103-32*c -: 8];
      o[127-32*c -: 8] = gmul(a0, 8'h02) ^ gmul(a1, 8'h03) ^ a2 ^ a3;
      o[119-32*c -: 8] = a0 ^ gmul(a1, 8'h02) ^ gmul(a2, 8'h03) ^ a3;
      o[111-32*c -: 8] = a0 ^ a1 ^ gmul(a2, 8'h02) ^ gmul(a3, 8'h03);
      o[103-32*c -: 8] = gmul(a0, 8'h03) ^ a1 ^ a2 ^ gmul(a3, 8'h02);
    end
    return o;
  endfunction

  // AES-128 key expansion: rk[0] .. rk[10]
  typedef logic [127:0] rk_t [11];

  function automatic rk_t key_expand(input logic [127:0] key);
    rk_t rk;
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0] rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rcon;
        rcon = gmul(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    rk_t rk = key_expand(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s ^= rk[r];
    end
    return s;
  endfunction

endpackage
