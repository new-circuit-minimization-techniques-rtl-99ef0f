// tb_sbox_top_fmux: exhaustive check of the floating-multiplexer top layer
// in both directions. L is compared with the reference vectors
// (Aff(beta_i * U^16) forward, beta_i * V^16 inverse, V = A^-1(U + 0x63));
// Q is checked by applying the Mul-Sum rule of sbox_pkg and comparing with
// the coordinates of U^17 or V^17.
module tb_sbox_top_fmux;
  import sbox_pkg::*;
  import aes_ref_pkg::*;
  byte_t u, v;
  sbox_dir_e fwd;
  q_vec_t q;
  l_vec_t l;
  int checks = 0, failures = 0;

  sbox_top_fmux dut (.u(u), .fwd(fwd), .q(q), .l(l));

  function automatic logic [3:0] eval_mulsum(input q_vec_t qq);
    logic [3:0] x = '0;
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 9; j++) begin
        if (MS_AND[k][j]) x[k] ^= qq[2*j] & qq[2*j+1];
        if (MS_XOR[k][j]) x[k] ^= qq[2*j] ^ qq[2*j+1];
      end
    return x;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 512; n++) begin
      u = 8'(n);
      fwd = sbox_dir_e'(n >= 256);
      v = (fwd == SBOX_FWD) ? u : ginv(inv_sbox(u));
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (l[8*i +: 8] !== ((fwd == SBOX_FWD) ? aff_lin(gmul(REF_BETA[i], gpow(v, 16)))
                                               : gmul(REF_BETA[i], gpow(v, 16)))) begin
          failures++;
          $display("FAIL L u=%h fwd=%b i=%0d", u, fwd, i);
        end
      end
      checks++;
      if (eval_mulsum(q) !== gf16_coord(gpow(v, 17))) begin
        failures++;
        $display("FAIL Q u=%h fwd=%b", u, fwd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
