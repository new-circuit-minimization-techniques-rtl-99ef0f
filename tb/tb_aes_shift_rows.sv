// tb_aes_shift_rows: checks ShiftRows on the FIPS-197 round-1 vector and on
// random states against the reference model.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] s_in, s_out;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.s_in(s_in), .s_out(s_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 Appendix B, round 1: after SubBytes -> after ShiftRows
    s_in = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1;
    checks++;
    if (s_out !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) failures++;
    for (int n = 0; n < 200; n++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (s_out !== shift_rows(s_in)) begin
        failures++;
        $display("FAIL %h", s_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
