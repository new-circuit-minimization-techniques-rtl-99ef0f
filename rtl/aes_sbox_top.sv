// aes_sbox_top: top level of the low-depth AES SBox design.
//
// Two independent parts stand side by side:
//  * an iterative AES encryption datapath (aes_round) whose SubBytes uses
//    sixteen forward low-depth SBoxes; round control and round keys come from
//    outside, one round per enabled clock, ciphertext after 10 rounds;
//  * a combined forward/inverse SBox (sbox_comb) with its own byte ports,
//    combinational, cb_fwd = 1 for SBox and 0 for InvSBox.
module aes_sbox_top
  import sbox_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic         last,
  input  logic [127:0] plaintext,
  input  logic [127:0] roundkey1,
  input  logic [127:0] roundkey_n,
  output logic [127:0] ciphertext,
  input  byte_t        cb_in,
  input  logic         cb_fwd,
  output byte_t        cb_out
);
  aes_round u_round (
    .clk, .rst_n, .en, .load, .last,
    .plaintext, .roundkey1, .roundkey_n, .ciphertext
  );

  sbox_comb u_comb (.u(cb_in), .fwd(sbox_dir_e'(cb_fwd)), .r(cb_out));
endmodule
