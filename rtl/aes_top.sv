// aes_top: AES-128 encryption followed by decryption of the result.
//
// The cipher encrypts `data` under `key`; when its cipher text is ready it
// raises go_d, which starts the decipher on that cipher text with the same
// key. decipher_txt therefore reproduces `data`, which makes the block a
// self-test of the two halves as well as an encryptor/decryptor.
//
// Timing after the rising edge that samples go_i: cipher_txt and go_d are
// valid 22 clocks later, decipher_txt 45 clocks later
// (the decipher samples go_d one clock after it rises). Both halves then keep
// cycling until reset. Ports are the document's, plus go_d, brought out so a
// user can tell when cipher_txt is first valid, and the decipher's round
// count dec_rnd. Reset is synchronous and
// active high.
module aes_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   go_i,
  input  block_t data,
  input  block_t key,
  output block_t cipher_txt,
  output block_t decipher_txt,
  output logic   go_d,
  output round_t dec_rnd
);

  final_cipher u_cipher (
    .clk, .reset, .go_i, .data, .key, .cipher_txt, .go_d
  );

  final_decipher u_decipher (
    .clk, .reset, .go_i(go_d), .cipher(cipher_txt), .key,
    .decipher(decipher_txt), .rnd(dec_rnd)
  );

endmodule
