// down_counter: round counter of the decipher.
//
// Registered: on each rising edge cnt_out becomes cnt_in - 1 when enable is
// high (wrapping from 0 to all ones), and cnt_in otherwise. Synchronous
// active-high reset sets it to RESET_VAL, the decipher's first round (10).
// The wrap below 0 is what lets the decipher controller see a round count
// above 10 after round 0. Width and reset value follow the document; the
// load-or-decrement behaviour is this design's.
module down_counter #(
  parameter int unsigned WIDTH     = 4,
  parameter int unsigned RESET_VAL = 10
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             enable,
  input  logic [WIDTH-1:0] cnt_in,
  output logic [WIDTH-1:0] cnt_out
);

  always_ff @(posedge clk) begin
    if (reset)       cnt_out <= WIDTH'(RESET_VAL);
    else if (enable) cnt_out <= cnt_in - 1'b1;
    else             cnt_out <= cnt_in;
  end

endmodule
