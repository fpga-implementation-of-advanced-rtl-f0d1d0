// tb_inv_row_shift: self-checking testbench of inv_row_shift.
//
// Drives random 128-bit states with enable high and compares the output with
// the reference model in aes_ref_pkg (byte permutation); checks that enable low
// passes the input through unchanged; and checks fixed vectors:
//   the inverse of the published row-shift vector and FIPS-197 C.1.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_inv_row_shift;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         enable;
  logic [127:0] data_in, data_out;
  int checks = 0, failures = 0;

  inv_row_shift dut (.enable, .data_in, .data_out);

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
    enable = 1'b1; data_in = transpose(128'hffeeddccaa9988bb5544776600332211);
    @(posedge clk);
    check("inverse of the waveform vector", data_out, transpose(128'hffeeddccbbaa99887766554433221100));
    data_in = 128'h7ad5fda789ef4e272bca100b3d9ff59f;
    @(posedge clk);
    check("FIPS-197 C.1 inverse round 1", data_out, 128'h7a9f102789d5f50b2beffd9f3dca4ea7);
    for (int n = 0; n < 300; n++) begin
      v = rand128();
      enable = 1'b1; data_in = v;
      @(posedge clk);
      check("random", data_out, r_shift(v, 1));
      enable = 1'b0;
      @(posedge clk);
      check("bypass", data_out, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
