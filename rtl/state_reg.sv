// state_reg: register with load enable and synchronous reset.
//
// q takes d on the rising clock edge where load is high, holds otherwise,
// and clears to 0 on the edge where reset (active high) is high. Used for
// the round state (Sa) and the result registers of the cipher and decipher
// datapaths. Width defaults to the document's 128 bits; the reset style is
// this design's choice.
module state_reg #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)     q <= '0;
    else if (load) q <= d;
  end

endmodule
