// tb_aes_mix_columns: checks MixColumns on the FIPS-197 round-1 vector and on
// random states against the reference model (built on a generic GF(2^8)
// multiplier rather than xtime).
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] s_in, s_out;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.s_in(s_in), .s_out(s_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_in = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1;
    checks++;
    if (s_out !== 128'h046681e5e0cb199a48f8d37a2806264c) failures++;
    for (int n = 0; n < 200; n++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (s_out !== mix_columns(s_in)) begin
        failures++;
        $display("FAIL %h", s_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
