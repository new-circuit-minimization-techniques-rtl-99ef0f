// gf16_inv: inversion in GF(2^4) with 9 gates and depth 3.
//
// Y = X^-1 (and 0 -> 0), in the basis beta = (0x0C, 0x51, 0xB0, 0xEC) of the
// subfield GF(16) of the AES field. As polynomials:
//   Y0 = X1X2X3 + X0X2 + X1X2 + X2 + X3
//   Y1 = X0X2X3 + X0X2 + X1X2 + X1X3 + X3
//   Y2 = X0X1X3 + X0X2 + X0X3 + X0 + X1
//   Y3 = X0X1X2 + X0X2 + X0X3 + X1X3 + X1
// The gate network (NAND, NOR, XNOR and six multiplexers) is the published
// one. mux(s, a, b) below is "s ? a : b"; that argument order is the one for
// which the network equals the polynomials above. Purely combinational.
module gf16_inv
  import sbox_pkg::*;
(
  input  gf16_t x,
  output gf16_t y
);
  function automatic logic mux(input logic s, input logic a, input logic b);
    return s ? a : b;
  endfunction

  logic t0, t1, t2, t3, t4;

  always_comb begin
    t0   = ~(x[0] & x[2]);          // NAND
    t1   = ~(x[1] | x[3]);          // NOR
    t2   = ~(t0 ^ t1);              // XNOR
    t3   = mux(x[1], x[2], 1'b1);
    t4   = mux(x[3], x[0], 1'b1);
    y[0] = mux(x[2], t2,   x[3]);
    y[1] = mux(t2,   x[3], t3);
    y[2] = mux(x[0], t2,   x[1]);
    y[3] = mux(t2,   x[1], t4);
  end
endmodule
