// final_cipher: AES-128 encryption block (control unit plus datapath).
//
// Pulse or hold go_i while the controller is in INIT to start. The block
// then encrypts `data` under `key` in 22 clocks: cipher_txt and go_d change
// on the 22nd rising edge after the one that samples go_i. The controller then
// keeps cycling (24 clocks per pass, restarting on the current data and key)
// until reset, so cipher_txt follows later changes of data or key.
//
// go_d goes high together with the first cipher text and stays high until
// reset; it is the start signal of the decipher. `data` and `key` must be
// held stable while a pass runs. The structure (control unit driving the
// datapath through count_en, load_reg, load_rgk, sel, sline and the round
// signals) is the document's; the sticky go_d flag is this design's choice.
module final_cipher
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   go_i,
  input  block_t data,
  input  block_t key,
  output block_t cipher_txt,
  output logic   go_d
);

  logic [3:0] load_reg, sel;
  logic       count_en, go, load_rgk, sline;
  round_t     fsm_rnd, cnt_rnd;

  cipher_fsm u_fsm (
    .clk, .reset, .go_i, .rnd_in(cnt_rnd), .load_reg, .rnd_out(fsm_rnd),
    .sel, .count_en, .go, .load_rgk, .sline
  );

  cipher_datapath u_dp (
    .clk, .reset, .data, .key, .sline, .sel, .load_reg, .load_rgk, .count_en,
    .rnd_in(fsm_rnd), .rnd_out(cnt_rnd), .cipher_txt
  );

  always_ff @(posedge clk) begin
    if (reset)   go_d <= 1'b0;
    else if (go) go_d <= 1'b1;
  end

endmodule
