// tb_byte_sub: self-checking testbench of byte_sub.
//
// Drives random 128-bit states with enable high and compares the output with
// the reference model in aes_ref_pkg (S-box built from its definition); checks that enable low
// passes the input through unchanged; and checks fixed vectors:
//   S-box(95)=2a (the document's example), S-box(00)=63, FIPS-197 C.1 round 1.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_byte_sub;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         enable;
  logic [127:0] data_in, data_out;
  int checks = 0, failures = 0;

  byte_sub dut (.enable, .data_in, .data_out);

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
    enable = 1'b1; data_in = {8'h95, 120'h0};
    @(posedge clk);
    check("sbox(95)=2a and sbox(00)=63", data_out, {8'h2a, {15{8'h63}}});
    data_in = 128'h00102030405060708090a0b0c0d0e0f0;
    @(posedge clk);
    check("FIPS-197 C.1 round 1 s_box", data_out, 128'h63cab7040953d051cd60e0e7ba70e18c);
    for (int n = 0; n < 300; n++) begin
      v = rand128();
      enable = 1'b1; data_in = v;
      @(posedge clk);
      check("random", data_out, r_sub(v, 0));
      enable = 1'b0;
      @(posedge clk);
      check("bypass", data_out, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
