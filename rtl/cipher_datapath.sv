// cipher_datapath: datapath of the iterative AES-128 cipher.
//
// One AES round per processing clock. A 2:1 mux picks the plain text
// (sline=0, first round) or the fed-back state Sa (sline=1). The picked state
// goes through byte substitution, row shift, mix column and add round key,
// each enabled by one bit of sel (3: byte sub, 2: row shift, 1: mix column,
// 0: add round key) and bypassed when its bit is low. The result is stored in
// the state register Sa when load_reg[0] is high and in the result register
// (cipher_txt) when load_reg[1] is high.
// load_reg keeps the 4-bit width of the controller's port; bits 3:2 are
// not used by this datapath.
//
// The key expansion unit registers the round key of round rnd_out (the
// counter value) when load_rgk is high; add round key uses that register.
// The up counter holds the round count: it loads rnd_in, or rnd_in+1 when
// count_en is high. All registers reset synchronously (reset high) to 0.
//
// The blocks and their order are the document's. It draws a register after
// each transformation; here the four steps form one combinational path into
// a single state register, since the controller loads every register in the
// same state and completes a round per processing state.
module cipher_datapath
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  block_t     data,
  input  block_t     key,
  input  logic       sline,
  input  logic [3:0] sel,
  input  logic [3:0] load_reg,
  input  logic       load_rgk,
  input  logic       count_en,
  input  round_t     rnd_in,
  output round_t     rnd_out,
  output block_t     cipher_txt
);

  block_t sa, mux_out, bs_out, sr_out, mc_out, ark_out, round_key;

  always_comb mux_out = sline ? sa : data;

  byte_sub      u_bs  (.enable(sel[3]), .data_in(mux_out), .data_out(bs_out));
  row_shift     u_sr  (.enable(sel[2]), .data_in(bs_out),  .data_out(sr_out));
  mix_column    u_mc  (.enable(sel[1]), .data_in(sr_out),  .data_out(mc_out));
  add_round_key u_ark (.enable(sel[0]), .data_in(mc_out),  .w(round_key), .data_out(ark_out));

  key_exp u_key (
    .clk, .reset, .enable(load_rgk), .key, .round(rnd_out), .key_out(round_key)
  );

  up_counter #(.WIDTH(4)) u_cnt (
    .clk, .reset, .enable(count_en), .cnt_in(rnd_in), .cnt_out(rnd_out)
  );

  state_reg #(.WIDTH(128)) u_sa  (.clk, .reset, .load(load_reg[0]), .d(ark_out), .q(sa));
  state_reg #(.WIDTH(128)) u_res (.clk, .reset, .load(load_reg[1]), .d(ark_out), .q(cipher_txt));

endmodule
