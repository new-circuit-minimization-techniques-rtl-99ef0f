// tb_gf16_inv: exhaustive check of the 9-gate GF(2^4) inversion.
// For every X the expected Y is the coordinate vector of (X as a GF(2^8)
// subfield element)^254, computed by the reference model; X = 0 must give 0.
// It also checks X * Y = 1 in the field for X != 0.
module tb_gf16_inv;
  import aes_ref_pkg::*;
  logic [3:0] x, y;
  int checks = 0, failures = 0;

  gf16_inv dut (.x(x), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      x = 4'(c);
      #1;
      checks++;
      if (y !== gf16_coord(ginv(gf16_val(x)))) begin
        failures++;
        $display("FAIL x=%h y=%h", x, y);
      end
      if (c != 0) begin
        checks++;
        if (gmul(gf16_val(x), gf16_val(y)) != 8'h01) begin
          failures++;
          $display("FAIL product x=%h y=%h", x, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
