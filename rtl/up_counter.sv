// up_counter: round counter of the cipher.
//
// Registered: on each rising edge cnt_out becomes cnt_in + 1 when enable is
// high, and cnt_in otherwise. The controller drives cnt_in with the current
// count to advance or hold it, and with 0 to restart the round sequence.
// Synchronous active-high reset clears it to 0. The 4-bit width is the
// document's; the load-or-increment behaviour is this design's reading of
// the counter's input/output pins.
module up_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             enable,
  input  logic [WIDTH-1:0] cnt_in,
  output logic [WIDTH-1:0] cnt_out
);

  always_ff @(posedge clk) begin
    if (reset)       cnt_out <= '0;
    else if (enable) cnt_out <= cnt_in + 1'b1;
    else             cnt_out <= cnt_in;
  end

endmodule
