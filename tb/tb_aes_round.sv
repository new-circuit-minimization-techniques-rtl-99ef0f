// tb_aes_round: runs AES-128 encryptions through the iterative round datapath.
// Round keys come from the reference key expansion. Checks the FIPS-197
// Appendix C.1 vector and random plaintext/key pairs against the reference
// encryption, that the result appears after exactly 10 enabled clocks, that
// en = 0 holds the state, and that reset clears it.
module tb_aes_round;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0, last = 1'b0;
  logic [127:0] plaintext = '0, roundkey1 = '0, roundkey_n = '0, ciphertext;
  int checks = 0, failures = 0, cycles = 0;

  aes_round dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_aes(input logic [127:0] pt, input logic [127:0] key);
    rk_t rk = key_expand(key);
    int start;
    plaintext = pt;
    roundkey1 = rk[0];
    start = cycles;
    for (int r = 1; r <= 10; r++) begin
      load = (r == 1);
      last = (r == 10);
      en = 1'b1;
      roundkey_n = rk[r];
      @(posedge clk);
      #1;
    end
    en = 1'b0; load = 1'b0; last = 1'b0;
    checks++;
    if (ciphertext !== encrypt(pt, key)) begin
      failures++;
      $display("FAIL pt=%h key=%h ct=%h exp=%h", pt, key, ciphertext, encrypt(pt, key));
    end
    checks++;
    if (cycles - start != 10) begin
      failures++;
      $display("FAIL latency %0d", cycles - start);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (ciphertext !== '0) failures++;
    run_aes(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    checks++;
    if (ciphertext !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    // hold with en = 0
    roundkey_n = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (ciphertext !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    for (int n = 0; n < 6; n++)
      run_aes({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    rst_n = 1'b0;
    #1;
    checks++;
    if (ciphertext !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
