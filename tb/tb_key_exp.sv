// tb_key_exp: self-checking testbench of key_exp.
//
// For random keys and every round 0..10 (in random order), loads key_out
// with enable and compares it one clock later with the word-array key
// schedule of aes_ref_pkg. Also checks the FIPS-197 Appendix A.1 round-10
// key, that key_out holds while enable is low, that rounds above 10 give the
// round-10 key, and that reset clears key_out. A watchdog ends a hung run.
module tb_key_exp;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, reset, enable;
  logic [127:0] key, key_out;
  logic [3:0]   round;
  int checks = 0, failures = 0;

  key_exp dut (.clk, .reset, .enable, .key, .round, .key_out);

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic load(logic [127:0] k, int r);
    key = k; round = 4'(r); enable = 1'b1;
    @(posedge clk); #1;
    enable = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, held;
    reset = 1'b1; enable = 1'b0; key = '0; round = '0;
    @(posedge clk); #1;
    check("reset", key_out, '0);
    reset = 1'b0;
    load(128'h2b7e151628aed2a6abf7158809cf4f3c, 10);
    check("FIPS-197 A.1 round 10", key_out, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    load(128'h2b7e151628aed2a6abf7158809cf4f3c, 1);
    check("FIPS-197 A.1 round 1", key_out, 128'ha0fafe1788542cb123a339392a6c7605);
    for (int n = 0; n < 40; n++) begin
      k = rand128();
      for (int r = 0; r <= 10; r++) begin
        int rr;
        rr = (r * 7 + n) % 11;
        load(k, rr);
        check($sformatf("round %0d", rr), key_out, r_round_key(k, rr));
      end
      held = key_out;
      key = rand128(); round = 4'($urandom_range(0, 10));
      @(posedge clk); #1;
      check("hold", key_out, held);
      load(k, 11 + n % 5);
      check("round above 10", key_out, r_round_key(k, 10));
    end
    reset = 1'b1;
    @(posedge clk); #1;
    check("reset again", key_out, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
