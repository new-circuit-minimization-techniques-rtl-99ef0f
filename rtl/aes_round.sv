// aes_round: iterative AES encryption datapath, one round per clock.
//
//   plaintext ^ roundkey1 --+
//                           mux(load) -> SubBytes -> ShiftRows -+-> MixColumns -+
//   state register ---------+                                   +---------------mux(last)
//   mux(last) ^ roundkey_n -> state register (when en) -> ciphertext / feedback
//
// The datapath and its two multiplexers are the standard round structure;
// the round control is outside: the user asserts load with en in the first
// round, last in the final round, and supplies the round key of every round
// on roundkey_n (the key schedule is not part of this block). For AES-128 the
// ciphertext is in the register after 10 enabled clock edges, the first one
// with load = 1 and the tenth with last = 1. Asynchronous active-low reset
// clears the state register (a choice of this design).
module aes_round (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic         last,
  input  logic [127:0] plaintext,
  input  logic [127:0] roundkey1,
  input  logic [127:0] roundkey_n,
  output logic [127:0] ciphertext
);
  logic [127:0] state_q, round_in, sb, sr, mc, round_out;

  always_comb round_in = load ? (plaintext ^ roundkey1) : state_q;

  aes_sub_bytes   u_sb (.s_in(round_in), .s_out(sb));
  aes_shift_rows  u_sr (.s_in(sb), .s_out(sr));
  aes_mix_columns u_mc (.s_in(sr), .s_out(mc));

  always_comb round_out = (last ? sr : mc) ^ roundkey_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state_q <= '0;
    else if (en) state_q <= round_out;
  end

  assign ciphertext = state_q;
endmodule
