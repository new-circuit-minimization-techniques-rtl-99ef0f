// tb_sbox_mulsum: checks Mul-Sum on the Q vectors of all 256 inputs of both
// top layers: X must be the coordinates of U^17 (forward) or V^17 (inverse),
// V = A^-1(U + 0x63), taken from the reference field model.
module tb_sbox_mulsum;
  import sbox_pkg::*;
  import aes_ref_pkg::*;
  byte_t u, v;
  q_vec_t q_f, q_i, q;
  l_vec_t l_f, l_i;
  gf16_t x;
  int checks = 0, failures = 0;

  sbox_top_fwd u_tf (.u(u), .q(q_f), .l(l_f));
  sbox_top_inv u_ti (.u(u), .q(q_i), .l(l_i));
  sbox_mulsum dut (.q(q), .x(x));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      u = 8'(n);
      v = ginv(inv_sbox(u));
      #1 q = q_f;
      #1;
      checks++;
      if (x !== gf16_coord(gpow(u, 17))) begin
        failures++;
        $display("FAIL fwd u=%h x=%h", u, x);
      end
      q = q_i;
      #1;
      checks++;
      if (x !== gf16_coord(gpow(v, 17))) begin
        failures++;
        $display("FAIL inv u=%h x=%h", u, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
