// key_exp: AES-128 key expansion unit.
//
// Produces the round key of round `round` (0..10) from the 128-bit cipher
// key. The key schedule is the FIPS-197 one: round key 0 is the cipher key,
// and each following round key is derived from the previous one (first
// word: RotWord, SubWord and XOR with the round constant RC, RC[1]=01,
// RC[j]=02*RC[j-1] in GF(2^8); the other words: XOR chain). All ten steps are
// unrolled, so the key of any round is available directly, in ascending order
// for the cipher and descending order for the decipher, without storing a
// schedule. A round value above 10 selects round 10's key.
//
// Timing: key_out is registered. It takes the selected round key on the
// clock edge where enable is high, holds otherwise, and clears to 0 on a
// synchronous active-high reset. Port names and the key/round inputs are the
// document's; the unrolled build and the register are this design's.
module key_exp
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   enable,
  input  block_t key,
  input  round_t round,
  output block_t key_out
);

  block_t rk [NR + 1];
  byte_t  rc [NR + 1];

  always_comb begin
    rk[0] = key;
    rc[0] = 8'h00;
    rc[1] = 8'h01;
    for (int r = 2; r <= NR; r++) rc[r] = xtime(rc[r - 1]);
    for (int r = 1; r <= NR; r++) rk[r] = next_round_key(rk[r - 1], rc[r]);
  end

  block_t selected;
  always_comb selected = (round > round_t'(NR)) ? rk[NR] : rk[round];

  always_ff @(posedge clk) begin
    if (reset)       key_out <= '0;
    else if (enable) key_out <= selected;
  end

endmodule
