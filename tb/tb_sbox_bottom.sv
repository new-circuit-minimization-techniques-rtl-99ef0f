// tb_sbox_bottom: random check of the NAND/XOR4 output layer against
// R_j = XOR_i (Y_i AND L[8i+j]) XOR c_j, plus the corner Y = 0 (R = c).
module tb_sbox_bottom;
  import sbox_pkg::*;
  gf16_t y;
  l_vec_t l;
  byte_t c, r, e;
  int checks = 0, failures = 0;

  sbox_bottom dut (.y(y), .l(l), .c(c), .r(r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      y = (n < 16) ? 4'(n) : 4'($urandom);
      l = $urandom;
      c = (n % 3 == 0) ? 8'h00 : ((n % 3 == 1) ? 8'h63 : 8'($urandom));
      #1;
      e = c;
      for (int i = 0; i < 4; i++) if (y[i]) e ^= l[8*i +: 8];
      checks++;
      if (r !== e) begin
        failures++;
        $display("FAIL y=%h l=%h c=%h r=%h exp=%h", y, l, c, r, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
