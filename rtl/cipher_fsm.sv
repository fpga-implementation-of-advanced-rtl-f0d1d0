// cipher_fsm: control unit of the AES-128 cipher.
//
// A six-state machine. INIT (the reset state) waits for go_i and then moves
// to S0. S0 looks at the round count rnd_in and branches: round 0 -> S1,
// rounds 1..9 -> S2, round 10 -> S3, above 10 -> S4. Each of S1..S4 returns
// to S0, so one encryption takes 22 clocks after INIT: eleven round steps of
// two clocks each (S0, then S1/S2/S3). S4 resets the round count to 0, after
// which the machine starts over on the data input; it runs until reset.
//
// Outputs are decoded from the state alone (Moore):
//   state  sel(BS,SR,MC,ARK) load_reg(res,Sa) sline count_en rnd_out load_rgk go
//   INIT   0000              00               0     0        0       0        0
//   S0     0000              00               0     0        rnd_in  1        0
//   S1     0001              01               0     1        rnd_in  0        0
//   S2     1111              01               1     1        rnd_in  0        0
//   S3     1101              11               1     1        rnd_in  0        1
//   S4     0000              00               1     0        0       0        0
// The state graph and the per-state table are the document's. This design
// chooses the bit order of sel and load_reg (load_reg[3:2] unused, held 0),
// drives sline 0 in S0 where the mux is idle, loads the round-key register
// in S0 (load_rgk) so the key is ready for the processing state, and makes
// go a one-clock pulse in S3.
module cipher_fsm
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
  output logic       go,
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
        if (rnd_in == 4'd0)                 next = ST_S1;
        else if (rnd_in < round_t'(NR))     next = ST_S2;
        else if (rnd_in == round_t'(NR))    next = ST_S3;
        else                                next = ST_S4;
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
    go       = 1'b0;
    unique case (state)
      ST_INIT: rnd_out = '0;
      ST_S0:   load_rgk = 1'b1;
      ST_S1: begin
        sel = 4'b0001; load_reg = 4'b0001; count_en = 1'b1;
      end
      ST_S2: begin
        sel = 4'b1111; load_reg = 4'b0001; sline = 1'b1; count_en = 1'b1;
      end
      ST_S3: begin
        sel = 4'b1101; load_reg = 4'b0011; sline = 1'b1; count_en = 1'b1; go = 1'b1;
      end
      ST_S4: begin
        sline = 1'b1; rnd_out = '0;
      end
      default: rnd_out = '0;
    endcase
  end

endmodule
