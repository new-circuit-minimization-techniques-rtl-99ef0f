// sbox_pkg: types and constant matrices shared by the low-depth AES SBox.
//
// The SBox computes U^-1 through the subfield GF(2^4) of the AES field
// GF(2^8) = GF(2)[z]/(z^8+z^4+z^3+z+1):
//   X = U^17 = U * U^16          (a GF(2^4) element, "Mul-Sum")
//   Y = X^-1                     (4-bit inversion)
//   U^-1 = Y * U^16 = sum_i Y_i * (beta_i * U^16)
// and the linear part of the AES affine map is pushed into the last term, so
// the forward SBox is R = sum_i Y_i * L_i + 0x63 with L_i = Aff(beta_i*U^16).
// (This is the plain case alpha = 1, frob = 0 of the transformation below;
// otherwise the field element W = alpha * U^(2^frob) takes the place of U in
// the nonlinear middle.)
//
// GF(2^4) elements (X, Y) are coordinates in the basis
//   beta = (0x0C, 0x51, 0xB0, 0xEC)   (AES polynomial coordinates)
// which is the basis in which the published 4-bit inversion formulas hold.
//
// Q (18 bits) holds nine pairs of linear forms of U. With U = a0*Yn + a1*Yn^16
// (Yn = 0x12, Yn + Yn^16 = 1) one has U^17 = a0*a1 + n*(a0+a1)^2, n = Yn^17.
// The product a0*a1 is a two-level Karatsuba multiplication over GF(4)
// (GF(16) basis 1, t, w, t*w with t = 0xBC, w = 0x5C), whose nine AND gates
// take the pairs (q[2j], q[2j+1]). The linear term n*(a0+a1)^2 is a sum of
// pair sums q[2j]^q[2j+1], so Mul-Sum needs no further inputs:
//   X_k = XOR_j ( MS_AND[k][j] & q[2j]&q[2j+1]  ^  MS_XOR[k][j] & (q[2j]^q[2j+1]) )
// A pair used both ways is an OR gate.
//
// Only the 18 base Q rows and the Mul-Sum selection are tabulated; they
// follow from the formulas above. Every other row (the L vectors, the inverse
// direction V = A^-1*(U + 0x63) = A^-1*U + 0x05, and the additional
// transformation W = alpha * V^(2^frob)) is computed at elaboration by
// top_rows() from GF(2^8) arithmetic. Which matrices to use is this design's
// own derivation; the structure (18-bit Q, 4-bit X and Y, 32-bit L,
// 32 NAND2 + 8 XOR4 at the output) and the (alpha, frob) family are the
// architecture's.
package sbox_pkg;

  localparam int unsigned QW = 18;   // width of Q
  localparam int unsigned LW = 32;   // width of L (4 x 8)
  localparam int unsigned NPAIRS = QW / 2;

  typedef logic [3:0]    gf16_t;      // GF(2^4) element in the beta basis
  typedef logic [QW-1:0] q_vec_t;
  typedef logic [LW-1:0] l_vec_t;     // l[8*i + j]: bit j of M_i * U
  typedef logic [7:0]    byte_t;

  typedef enum logic { SBOX_INV = 1'b0, SBOX_FWD = 1'b1 } sbox_dir_e;

  // Constant of the AES affine map (added at the output of the forward SBox).
  localparam byte_t AES_B = 8'h63;

  // Base Q rows over the field element W that enters the nonlinear middle
  // (W = U for the plain forward SBox). Row k: bit m set if W[m] enters q[k].
  localparam byte_t Q_BASE [QW] = '{
    8'hBA, 8'h1A, 8'h92, 8'h4C, 8'h28, 8'h56, 8'h36, 8'h3A, 8'hAF,
    8'hDF, 8'h99, 8'hE5, 8'h8C, 8'h20, 8'h3D, 8'h93, 8'hB1, 8'hB3 };

  // GF(2^4) basis in AES polynomial coordinates (X, Y coordinates).
  localparam byte_t BETA [4] = '{ 8'h0C, 8'h51, 8'hB0, 8'hEC };

  // Mul-Sum: bit j of MS_AND[k] adds q[2j]&q[2j+1] to X_k,
  //          bit j of MS_XOR[k] adds q[2j]^q[2j+1] to X_k.
  localparam logic [NPAIRS-1:0] MS_AND [4] = '{
    9'b000101011, 9'b000011110, 9'b101000011, 9'b011000110 };
  localparam logic [NPAIRS-1:0] MS_XOR [4] = '{
    9'b000001011, 9'b000010001, 9'b000010000, 9'b000011000 };

  // ---------------------------------------------------------------------
  // Field arithmetic used to compute the linear layers at elaboration.
  // ---------------------------------------------------------------------
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t r  = 8'h00;
    byte_t aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1B : 8'h00);
    end
    return r;
  endfunction

  // a^(2^k): k squarings (k taken mod 8, squaring 8 times is the identity)
  function automatic byte_t gf_sq(input byte_t a, input int unsigned k);
    byte_t r = a;
    for (int unsigned i = 0; i < k % 8; i++) r = gf_mul(r, r);
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t x, input int unsigned n);
    return byte_t'((x << n) | (x >> (8 - n)));
  endfunction

  // Linear part of the AES affine map and its inverse.
  function automatic byte_t aes_aff(input byte_t x);
    return x ^ rotl8(x, 1) ^ rotl8(x, 2) ^ rotl8(x, 3) ^ rotl8(x, 4);
  endfunction

  function automatic byte_t aes_aff_inv(input byte_t x);
    return rotl8(x, 1) ^ rotl8(x, 3) ^ rotl8(x, 6);
  endfunction

  // A^-1 * 0x63: constant of the inverse SBox's input map.
  localparam byte_t AES_B_INV = 8'h05;

  // Rows of a top linear layer (bit m of a row: U[m] enters that output) and
  // the constant bits added to each output.
  typedef struct packed {
    logic [QW-1:0][7:0] q_row;
    q_vec_t             q_c;
    logic [LW-1:0][7:0] l_row;
    l_vec_t             l_c;
  } top_rows_t;

  // Rows for one direction and one additional transformation (alpha, frob):
  //   V  = U (forward) or A^-1*U + 0x05 (inverse)
  //   W  = alpha * V^(2^frob)                    enters Mul-Sum through Q_BASE
  //   V^-1 = sum_i Y_i * root_frob(alpha * beta_i * W^16), Y = (W^17)^-1
  //   L_i  = Aff(root_frob(alpha * beta_i * W^16)) forward, without Aff inverse
  // root_frob(v) = v^(2^(8-frob)). All maps are GF(2)-linear in V, so each
  // row is read off the images of the eight unit vectors.
  function automatic byte_t w_of(input byte_t v, input byte_t alpha, input int unsigned frob);
    return gf_mul(alpha, gf_sq(v, frob));
  endfunction

  function automatic byte_t l_of(input byte_t w, input logic [1:0] i, input byte_t alpha,
                                 input int unsigned frob, input sbox_dir_e dir);
    byte_t t = gf_sq(gf_mul(gf_mul(alpha, BETA[i]), gf_sq(w, 4)), 8 - frob % 8);
    return (dir == SBOX_FWD) ? aes_aff(t) : t;
  endfunction

  function automatic top_rows_t top_rows(input sbox_dir_e dir, input byte_t alpha,
                                         input int unsigned frob);
    top_rows_t r = '0;
    byte_t v, w;
    // linear part
    for (int m = 0; m < 8; m++) begin
      v = byte_t'(1 << m);
      if (dir == SBOX_INV) v = aes_aff_inv(v);
      w = w_of(v, alpha, frob);
      for (int k = 0; k < QW; k++) r.q_row[k][m] = ^(Q_BASE[k] & w);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 8; j++) r.l_row[8*i + j][m] = l_of(w, 2'(i), alpha, frob, dir)[j];
    end
    // constant part (inverse direction only)
    if (dir == SBOX_INV) begin
      w = w_of(AES_B_INV, alpha, frob);
      for (int k = 0; k < QW; k++) r.q_c[k] = ^(Q_BASE[k] & w);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 8; j++) r.l_c[8*i + j] = l_of(w, 2'(i), alpha, frob, dir)[j];
    end
    return r;
  endfunction

endpackage
