// tb_sbox_comb: exhaustive check of the combined SBox in both directions:
// forward against the reference SBox, inverse against InvSBox (found by
// searching the reference SBox), and InvSBox(SBox(x)) = x through the DUT.
// The default instance has the floating-multiplexer top layer; two more use
// the literal two-tops-and-multiplexer form and non-default transformations,
// and must agree with the reference too.
module tb_sbox_comb;
  import sbox_pkg::*;
  import aes_ref_pkg::*;
  byte_t u, r, fr;
  byte_t rv [2];
  sbox_dir_e fwd;
  int checks = 0, failures = 0;

  sbox_comb dut (.u(u), .fwd(fwd), .r(r));
  sbox_comb #(.FLOATING_MUX(1'b0)) dut_plain (.u(u), .fwd(fwd), .r(rv[0]));
  sbox_comb #(.FLOATING_MUX(1'b1), .ALPHA_F(8'h1D), .FROB_F(5), .ALPHA_I(8'hC4), .FROB_I(2))
    dut_xform (.u(u), .fwd(fwd), .r(rv[1]));

  task automatic check_variants(input byte_t exp);
    for (int v = 0; v < 2; v++) begin
      checks++;
      if (rv[v] !== exp) begin
        failures++;
        $display("FAIL variant %0d u=%h fwd=%b r=%h exp=%h", v, u, fwd, rv[v], exp);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      u = 8'(n);
      fwd = SBOX_FWD;
      #1;
      checks++;
      if (r !== sbox(u)) begin
        failures++;
        $display("FAIL fwd u=%h r=%h", u, r);
      end
      check_variants(sbox(u));
      fr = r;
      fwd = SBOX_INV;
      #1;
      checks++;
      if (r !== inv_sbox(u)) begin
        failures++;
        $display("FAIL inv u=%h r=%h", u, r);
      end
      check_variants(inv_sbox(u));
      u = fr;
      #1;
      checks++;
      if (r !== 8'(n)) begin
        failures++;
        $display("FAIL round trip x=%h", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
