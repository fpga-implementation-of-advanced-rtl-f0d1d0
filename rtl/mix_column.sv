// mix_column: one AES state transformation with a bypass.
//
// MixColumns: each column is multiplied in GF(2^8) by the circulant matrix {02 03 01 01}.
// With enable high the output is the transformed input; with enable low the
// input passes through unchanged, so the round controller can switch the
// step on or off per round. Purely combinational: the registers of the round
// datapath sit around it, not inside it. The enable-and-bypass behaviour is
// the document's; building the block without a clock is this design's
// choice. Byte order of data_in/data_out as in aes_pkg (column by column).
module mix_column
  import aes_pkg::*;
(
  input  logic   enable,
  input  block_t data_in,
  output block_t data_out
);

  always_comb data_out = enable ? mix_columns(data_in) : data_in;

endmodule
