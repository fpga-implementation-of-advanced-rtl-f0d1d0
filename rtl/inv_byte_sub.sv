// inv_byte_sub: one AES state transformation with a bypass.
//
// InvSubBytes: every byte of the state is replaced by its inverse S-box entry (aes_pkg::INV_SBOX).
// With enable high the output is the transformed input; with enable low the
// input passes through unchanged, so the round controller can switch the
// step on or off per round. Purely combinational: the registers of the round
// datapath sit around it, not inside it. The enable-and-bypass behaviour is
// the document's; building the block without a clock is this design's
// choice. Byte order of data_in/data_out as in aes_pkg (column by column).
module inv_byte_sub
  import aes_pkg::*;
(
  input  logic   enable,
  input  block_t data_in,
  output block_t data_out
);

  always_comb data_out = enable ? inv_sub_bytes(data_in) : data_in;

endmodule
