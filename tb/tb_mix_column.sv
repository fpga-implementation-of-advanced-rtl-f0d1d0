// tb_mix_column: self-checking testbench of mix_column.
//
// Drives random 128-bit states with enable high and compares the output with
// the reference model in aes_ref_pkg (GF(2^8) matrix product by shift-and-add); checks that enable low
// passes the input through unchanged; and checks fixed vectors:
//   FIPS-197 C.1 round 1 and the well-known columns db135345 -> 8e4da1bc,
//   f20a225c -> 9fdc589d.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mix_column;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         enable;
  logic [127:0] data_in, data_out;
  int checks = 0, failures = 0;

  mix_column dut (.enable, .data_in, .data_out);

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v;
    enable = 1'b1; data_in = 128'h6353e08c0960e104cd70b751bacad0e7;
    @(posedge clk);
    check("FIPS-197 C.1 round 1 m_col", data_out, 128'h5f72641557f5bc92f7be3b291db9f91a);
    data_in = 128'hdb135345f20a225c01010101c6c6c6c6;
    @(posedge clk);
    check("known columns", data_out, 128'h8e4da1bc9fdc589d01010101c6c6c6c6);
    for (int n = 0; n < 300; n++) begin
      v = rand128();
      enable = 1'b1; data_in = v;
      @(posedge clk);
      check("random", data_out, r_mix(v, 0));
      enable = 1'b0;
      @(posedge clk);
      check("bypass", data_out, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
