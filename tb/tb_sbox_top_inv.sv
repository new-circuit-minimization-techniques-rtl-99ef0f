// tb_sbox_top_inv: exhaustive check of the inverse top affine layer.
// With V = A^-1(U + 0x63) found from the reference SBox (V = SBox^-1(U)^-1),
// L must equal beta_i * V^16 and the Mul-Sum rule applied to Q must give the
// coordinates of V^17.
module tb_sbox_top_inv;
  import sbox_pkg::*;
  import aes_ref_pkg::*;
  byte_t u, v;
  q_vec_t q;
  l_vec_t l;
  int checks = 0, failures = 0;

  sbox_top_inv dut (.u(u), .q(q), .l(l));

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
    for (int n = 0; n < 256; n++) begin
      u = 8'(n);
      v = ginv(inv_sbox(u));
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (l[8*i +: 8] !== gmul(REF_BETA[i], gpow(v, 16))) begin
          failures++;
          $display("FAIL L u=%h i=%0d", u, i);
        end
      end
      checks++;
      if (eval_mulsum(q) !== gf16_coord(gpow(v, 17))) begin
        failures++;
        $display("FAIL Q u=%h", u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
