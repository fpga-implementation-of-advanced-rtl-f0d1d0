// tb_final_decipher: self-checking testbench of final_decipher.
//
// After reset the block must wait in INIT with rnd at 10 while go_i is low.
// go_i is pulsed for one clock and the testbench counts the clocks until
// `decipher` changes: 22 after the edge that samples go_i. The result is
// compared with the reference model (FIPS-197 C.1 and A.1 first). While the
// block keeps cycling, new cipher texts and keys are applied between passes;
// each new plain text must appear 24 clocks after the previous one. The rnd
// output is checked to run 10 down to 0 within a pass. A watchdog ends a
// hung run.
module tb_final_decipher;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, reset, go_i;
  logic [127:0] cipher, key, decipher;
  logic [3:0]   rnd;
  int checks = 0, failures = 0;

  final_decipher dut (.clk, .reset, .go_i, .cipher, .key, .decipher, .rnd);

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic start(logic [127:0] ct, logic [127:0] k, logic [127:0] pt, output int lat);
    int min_rnd = 15;
    reset = 1'b1; go_i = 1'b0; cipher = ct; key = k;
    @(posedge clk); #1;
    reset = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    check("no output before go_i", decipher, '0);
    check_int("round count waits at 10", int'(rnd), 10);
    go_i = 1'b1;
    @(posedge clk); #1;
    go_i = 1'b0;
    lat = 0;
    while (decipher !== pt && lat < 100) begin
      if (int'(rnd) < min_rnd) min_rnd = int'(rnd);
      @(posedge clk); #1;
      lat++;
    end
    check_int("round count reached 0", min_rnd, 0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [127:0] prev;
    start(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f,
          128'h00112233445566778899aabbccddeeff, lat);
    check_int("latency", lat, 22);
    check("FIPS-197 C.1", decipher, 128'h00112233445566778899aabbccddeeff);
    start(128'h3925841d02dc09fbdc118597196a0b32, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'h3243f6a8885a308d313198a2e0370734, lat);
    check_int("latency", lat, 22);
    check("FIPS-197 A.1", decipher, 128'h3243f6a8885a308d313198a2e0370734);
    for (int n = 0; n < 30; n++) begin
      int gap;
      gap = 0;
      prev = decipher;
      cipher = rand128();
      if (n % 3 == 0) key = rand128();
      do begin
        @(posedge clk); #1;
        gap++;
      end while (decipher === prev && gap < 100);
      check_int("pass period", gap, 24);
      check($sformatf("pass %0d", n), decipher, r_decrypt(cipher, key));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
