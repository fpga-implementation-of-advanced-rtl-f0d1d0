// add_round_key: AddRoundKey step of AES.
//
// With enable high the 128-bit state is XORed bit by bit with the 128-bit
// round key w (each state column with one key word); with enable low the
// state passes through unchanged. Combinational. The enable-and-bypass
// behaviour is the document's; the combinational build is this design's.
module add_round_key
  import aes_pkg::*;
(
  input  logic   enable,
  input  block_t data_in,
  input  block_t w,
  output block_t data_out
);

  always_comb data_out = enable ? (data_in ^ w) : data_in;

endmodule
