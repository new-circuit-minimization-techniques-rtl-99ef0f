// tb_aes_sbox_top: end-to-end test of the top level at its default sizes.
// Runs AES-128 encryptions (FIPS-197 C.1 and random) through the iterative
// datapath while sweeping the combined SBox over all 256 inputs in both
// directions, one byte per clock. Counts each mechanism the design has and
// fails if one never happened: first-round input mux, MixColumns path,
// last-round MixColumns bypass, register hold (en = 0), reset, forward and
// inverse mode of the combined SBox, and a zero field element inside the SBox
// (Y = 0, only the output constant remains).
module tb_aes_sbox_top;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0, last = 1'b0;
  logic [127:0] plaintext = '0, roundkey1 = '0, roundkey_n = '0, ciphertext;
  logic [7:0] cb_in = '0, cb_out;
  logic cb_fwd = 1'b1;
  int checks = 0, failures = 0, cycles = 0;
  int n_load = 0, n_mix = 0, n_bypass = 0, n_hold = 0, n_reset = 0;
  int n_cfwd = 0, n_cinv = 0, n_zero = 0, n_sbox_zero = 0;
  int sweep = 0;

  aes_sbox_top dut (.*);

  always #5 clk = ~clk;

  // The combined SBox is swept on the falling edge and checked before the next.
  always @(negedge clk) begin
    if (sweep > 0) begin
      checks++;
      if (cb_out !== (cb_fwd ? sbox(cb_in) : inv_sbox(cb_in))) begin
        failures++;
        $display("FAIL comb in=%h fwd=%b out=%h", cb_in, cb_fwd, cb_out);
      end
      if (cb_fwd) n_cfwd++; else n_cinv++;
      if ((cb_fwd && cb_in == 8'h00) || (!cb_fwd && cb_in == 8'h63)) n_zero++;
    end
    {cb_fwd, cb_in} = 9'(sweep);
    sweep++;
  end

  always @(posedge clk) begin
    cycles++;
    if (rst_n && en && load) n_load++;
    if (rst_n && en && !last) n_mix++;
    if (rst_n && en && last) n_bypass++;
    if (rst_n && !en) n_hold++;
    if (!rst_n) n_reset++;
    for (int b = 0; b < 16; b++)
      if (rst_n && en && dut.u_round.round_in[8*b +: 8] == 8'h00) n_sbox_zero++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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
      $display("FAIL pt=%h key=%h ct=%h", pt, key, ciphertext);
    end
    checks++;
    if (cycles - start != 10) begin
      failures++;
      $display("FAIL latency %0d", cycles - start);
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (ciphertext !== '0) failures++;
    run_aes(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    checks++;
    if (ciphertext !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    // all-zero plaintext with the all-zero key puts zero bytes into SubBytes
    run_aes('0, '0);
    while (sweep < 520) run_aes({$urandom, $urandom, $urandom, $urandom},
                                {$urandom, $urandom, $urandom, $urandom});
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (ciphertext !== '0) failures++;
    $display("mechanisms: load=%0d mixcolumns=%0d bypass=%0d hold=%0d reset=%0d comb_fwd=%0d comb_inv=%0d comb_zero=%0d sbox_zero_bytes=%0d",
             n_load, n_mix, n_bypass, n_hold, n_reset, n_cfwd, n_cinv, n_zero, n_sbox_zero);
    if (n_load == 0 || n_mix == 0 || n_bypass == 0 || n_hold == 0 || n_reset == 0) failures++;
    if (n_cfwd == 0 || n_cinv == 0 || n_zero == 0 || n_sbox_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
