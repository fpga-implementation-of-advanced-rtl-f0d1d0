// tb_row_shift: self-checking testbench of row_shift.
//
// Drives random 128-bit states with enable high and compares the output with
// the reference model in aes_ref_pkg (byte permutation); checks that enable low
// passes the input through unchanged; and checks fixed vectors:
//   the published row-shift waveform vector (given row by row, so compared
//   through a byte transpose) and FIPS-197 C.1 round 1.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_row_shift;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         enable;
  logic [127:0] data_in, data_out;
  int checks = 0, failures = 0;

  row_shift dut (.enable, .data_in, .data_out);

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
    enable = 1'b1; data_in = transpose(128'hffeeddccbbaa99887766554433221100);
    @(posedge clk);
    check("waveform vector (row-by-row order, transposed)", data_out, transpose(128'hffeeddccaa9988bb5544776600332211));
    data_in = 128'h63cab7040953d051cd60e0e7ba70e18c;
    @(posedge clk);
    check("FIPS-197 C.1 round 1 s_row", data_out, 128'h6353e08c0960e104cd70b751bacad0e7);
    for (int n = 0; n < 300; n++) begin
      v = rand128();
      enable = 1'b1; data_in = v;
      @(posedge clk);
      check("random", data_out, r_shift(v, 0));
      enable = 1'b0;
      @(posedge clk);
      check("bypass", data_out, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
