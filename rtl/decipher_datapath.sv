// decipher_datapath: datapath of the iterative AES-128 decipher.
//
// One inverse round per processing clock. A 2:1 mux picks the cipher text
// (sline=0, first round) or the fed-back state Sa (sline=1). The picked state
// goes through inverse row shift, inverse byte substitution, add round key
// and inverse mix column, each enabled by one bit of sel (3: inverse row
// shift, 2: inverse byte sub, 1: add round key, 0: inverse mix column) and
// bypassed when its bit is low. The result is stored in Sa when load_reg[0]
// is high and in the result register (decipher) when load_reg[1] is high.
// load_reg keeps the 4-bit width of the controller's port; bits 3:2 are
// not used by this datapath.
//
// The key expansion unit registers the round key of round rnd_out when
// load_rgk is high. The down counter loads rnd_in, or rnd_in-1 when count_en
// is high, and resets to 10. Other registers reset to 0.
//
// The order of the steps is the document's (the straight inverse cipher of
// FIPS-197, add round key before inverse mix column). As in the cipher, the
// document's register after each step is merged into the one state register.
module decipher_datapath
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  block_t     cipher,
  input  block_t     key,
  input  logic       sline,
  input  logic [3:0] sel,
  input  logic [3:0] load_reg,
  input  logic       load_rgk,
  input  logic       count_en,
  input  round_t     rnd_in,
  output round_t     rnd_out,
  output block_t     decipher
);

  block_t sa, mux_out, isr_out, isb_out, ark_out, imc_out, round_key;

  always_comb mux_out = sline ? sa : cipher;

  inv_row_shift  u_isr (.enable(sel[3]), .data_in(mux_out), .data_out(isr_out));
  inv_byte_sub   u_isb (.enable(sel[2]), .data_in(isr_out), .data_out(isb_out));
  add_round_key  u_ark (.enable(sel[1]), .data_in(isb_out), .w(round_key), .data_out(ark_out));
  inv_mix_column u_imc (.enable(sel[0]), .data_in(ark_out), .data_out(imc_out));

  key_exp u_key (
    .clk, .reset, .enable(load_rgk), .key, .round(rnd_out), .key_out(round_key)
  );

  down_counter #(.WIDTH(4), .RESET_VAL(NR)) u_cnt (
    .clk, .reset, .enable(count_en), .cnt_in(rnd_in), .cnt_out(rnd_out)
  );

  state_reg #(.WIDTH(128)) u_sa  (.clk, .reset, .load(load_reg[0]), .d(imc_out), .q(sa));
  state_reg #(.WIDTH(128)) u_res (.clk, .reset, .load(load_reg[1]), .d(imc_out), .q(decipher));

endmodule
