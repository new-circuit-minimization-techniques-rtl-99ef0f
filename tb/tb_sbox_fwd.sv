// tb_sbox_fwd: exhaustive check of the forward SBox against the reference
// SBox(x) = Aff(x^254) + 0x63, plus the two FIPS-197 table entries
// SBox(0x00) = 0x63 and SBox(0x53) = 0xED. Three more instances use other
// additional transformations (ALPHA, FROB), which must give the same SBox.
module tb_sbox_fwd;
  import aes_ref_pkg::*;
  logic [7:0] u, r;
  logic [7:0] rt [3];
  int checks = 0, failures = 0;

  sbox_fwd dut (.u(u), .r(r));
  sbox_fwd #(.ALPHA(8'h02), .FROB(3)) dut_t0 (.u(u), .r(rt[0]));
  sbox_fwd #(.ALPHA(8'h53), .FROB(7)) dut_t1 (.u(u), .r(rt[1]));
  sbox_fwd #(.ALPHA(8'hFF), .FROB(1)) dut_t2 (.u(u), .r(rt[2]));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      u = 8'(n);
      #1;
      checks++;
      if (r !== sbox(u)) begin
        failures++;
        $display("FAIL u=%h r=%h exp=%h", u, r, sbox(u));
      end
      for (int t = 0; t < 3; t++) begin
        checks++;
        if (rt[t] !== sbox(u)) begin
          failures++;
          $display("FAIL transform %0d u=%h r=%h", t, u, rt[t]);
        end
      end
    end
    u = 8'h00; #1; checks++; if (r !== 8'h63) failures++;
    u = 8'h53; #1; checks++; if (r !== 8'hED) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
