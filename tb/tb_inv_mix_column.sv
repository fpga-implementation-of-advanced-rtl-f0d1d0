// tb_inv_mix_column: self-checking testbench of inv_mix_column.
//
// Drives random 128-bit states with enable high and compares the output with
// the reference model in aes_ref_pkg (GF(2^8) matrix product); checks that enable low
// passes the input through unchanged; and checks fixed vectors:
//   the published inverse-mix-column waveform vector (row by row, compared
//   through a transpose) and the inverse of FIPS-197 C.1 round 1.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_inv_mix_column;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         enable;
  logic [127:0] data_in, data_out;
  int checks = 0, failures = 0;

  inv_mix_column dut (.enable, .data_in, .data_out);

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
    check("waveform vector (row-by-row order, transposed)", data_out, transpose(128'h617043522e3f0c1de9f8cbdaa6b78495));
    data_in = 128'h5f72641557f5bc92f7be3b291db9f91a;
    @(posedge clk);
    check("inverse of FIPS-197 C.1 round 1 m_col", data_out, 128'h6353e08c0960e104cd70b751bacad0e7);
    for (int n = 0; n < 300; n++) begin
      v = rand128();
      enable = 1'b1; data_in = v;
      @(posedge clk);
      check("random", data_out, r_mix(v, 1));
      enable = 1'b0;
      @(posedge clk);
      check("bypass", data_out, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
