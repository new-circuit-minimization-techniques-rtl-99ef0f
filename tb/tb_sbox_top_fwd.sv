// tb_sbox_top_fwd: exhaustive check of the forward top linear layer.
// L is compared with Aff(beta_i * U^16) from the reference field model; Q is
// checked by evaluating the Mul-Sum rule of sbox_pkg on it and comparing with
// the coordinates of U^17 (so a wrong Q row is caught).
module tb_sbox_top_fwd;
  import sbox_pkg::*;
  import aes_ref_pkg::*;
  byte_t u;
  q_vec_t q;
  l_vec_t l;
  int checks = 0, failures = 0;

  sbox_top_fwd dut (.u(u), .q(q), .l(l));

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
    for (int v = 0; v < 256; v++) begin
      u = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (l[8*i +: 8] !== aff_lin(gmul(REF_BETA[i], gpow(u, 16)))) begin
          failures++;
          $display("FAIL L u=%h i=%0d", u, i);
        end
      end
      checks++;
      if (eval_mulsum(q) !== gf16_coord(gpow(u, 17))) begin
        failures++;
        $display("FAIL Q u=%h", u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
