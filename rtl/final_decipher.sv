// final_decipher: AES-128 decryption block (control unit plus datapath).
//
// Started by go_i while in INIT (in the AES top this is the cipher's go_d).
// It decrypts `cipher` under `key` in 22 clocks: `decipher` changes on the
// 22nd rising edge after the one that samples go_i. Like the cipher it then
// keeps cycling (24 clocks per pass) until reset. rnd shows the round count,
// 10 at reset and counting down. Structure and ports are the document's.
module final_decipher
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   go_i,
  input  block_t cipher,
  input  block_t key,
  output block_t decipher,
  output round_t rnd
);

  logic [3:0] load_reg, sel;
  logic       count_en, load_rgk, sline;
  round_t     fsm_rnd;

  decipher_fsm u_fsm (
    .clk, .reset, .go_i, .rnd_in(rnd), .load_reg, .rnd_out(fsm_rnd),
    .sel, .count_en, .load_rgk, .sline
  );

  decipher_datapath u_dp (
    .clk, .reset, .cipher, .key, .sline, .sel, .load_reg, .load_rgk, .count_en,
    .rnd_in(fsm_rnd), .rnd_out(rnd), .decipher
  );

endmodule
