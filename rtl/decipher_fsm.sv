// decipher_fsm: control unit of the AES-128 decipher.
//
// The same six-state structure as the cipher's, with the round count running
// down from 10. INIT (the reset state) waits for go_i, then S0 branches on
// rnd_in: round 10 -> S1 (add round key only), round above 10 -> S4, round 0
// -> S3 (last round, result register loaded), any other round -> S2 (full
// inverse round). S1..S4 return to S0. After round 0 the 4-bit down counter
// wraps to 15, which sends S0 to S4, and S4 sets the count back to 10. One
// decryption takes 22 clocks after INIT.
//
// Outputs are decoded from the state alone (Moore):
//   state  sel(ISR,ISB,ARK,IMC) load_reg(res,Sa) sline count_en rnd_out load_rgk
//   INIT   0000                 00               0     0        10      0
//   S0     0000                 00               0     0        rnd_in  1
//   S1     0010                 01               0     1        rnd_in  0
//   S2     1111                 01               1     1        rnd_in  0
//   S3     1110                 11               1     1        rnd_in  0
//   S4     0000                 00               1     0        10      0
// The state graph and table are the document's. Its branch conditions
// overlap (round 10 is also above 0); this design gives round 10 priority,
// then above 10, then 0. Bit order of sel/load_reg and load_rgk in S0 are
// this design's choices, as in the cipher.
module decipher_fsm
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       go_i,
  input  round_t     rnd_in,
  output logic [3:0] load_reg,
  output round_t     rnd_out,
  output logic [3:0] sel,
  output logic       count_en,
  output logic       load_rgk,
  output logic       sline
);

  fsm_state_t state, next;

  always_ff @(posedge clk) begin
    if (reset) state <= ST_INIT;
    else       state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      ST_INIT: if (go_i) next = ST_S0;
      ST_S0:
        if (rnd_in == round_t'(NR))      next = ST_S1;
        else if (rnd_in > round_t'(NR))  next = ST_S4;
        else if (rnd_in == 4'd0)         next = ST_S3;
        else                             next = ST_S2;
      ST_S1, ST_S2, ST_S3, ST_S4: next = ST_S0;
      default: next = ST_INIT;
    endcase
  end

  always_comb begin
    sel      = 4'b0000;
    load_reg = 4'b0000;
    sline    = 1'b0;
    count_en = 1'b0;
    rnd_out  = rnd_in;
    load_rgk = 1'b0;
    unique case (state)
      ST_INIT: rnd_out = round_t'(NR);
      ST_S0:   load_rgk = 1'b1;
      ST_S1: begin
        sel = 4'b0010; load_reg = 4'b0001; count_en = 1'b1;
      end
      ST_S2: begin
        sel = 4'b1111; load_reg = 4'b0001; sline = 1'b1; count_en = 1'b1;
      end
      ST_S3: begin
        sel = 4'b1110; load_reg = 4'b0011; sline = 1'b1; count_en = 1'b1;
      end
      ST_S4: begin
        sline = 1'b1; rnd_out = round_t'(NR);
      end
      default: rnd_out = round_t'(NR);
    endcase
  end

endmodule
