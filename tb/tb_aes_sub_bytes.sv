// tb_aes_sub_bytes: checks the 16-SBox SubBytes layer on the FIPS-197
// round-1 vector and on random states against the reference SBox.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] s_in, s_out;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.s_in(s_in), .s_out(s_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    #1;
    checks++;
    if (s_out !== 128'hd42711aee0bf98f1b8b45de51e415230) failures++;
    for (int n = 0; n < 200; n++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (s_out !== sub_bytes(s_in)) begin
        failures++;
        $display("FAIL %h", s_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
