// tb_final_cipher: self-checking testbench of final_cipher.
//
// After reset the block must wait in INIT (no output, go_d low) while go_i
// is low. go_i is then pulsed for one clock, and the testbench counts the
// clocks until go_d rises: 22 after the edge that samples go_i. cipher_txt is
// compared with the reference model (first with the FIPS-197 C.1 and A.1
// vectors). Then, while the block keeps cycling, new plain texts and keys are
// applied between passes and every new cipher text must appear exactly 24
// clocks after the previous one. A watchdog ends a hung run.
module tb_final_cipher;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, reset, go_i, go_d;
  logic [127:0] data, key, cipher_txt;
  int checks = 0, failures = 0;

  final_cipher dut (.clk, .reset, .go_i, .data, .key, .cipher_txt, .go_d);

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

  // start from reset, return the clocks from the go_i edge until go_d
  task automatic start(logic [127:0] pt, logic [127:0] k, output int lat);
    reset = 1'b1; go_i = 1'b0; data = pt; key = k;
    @(posedge clk); #1;
    reset = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    check("no output before go_i", cipher_txt, '0);
    check_int("go_d low before go_i", int'(go_d), 0);
    go_i = 1'b1;
    @(posedge clk); #1;
    go_i = 1'b0;
    lat = 0;
    while (!go_d && lat < 100) begin
      @(posedge clk); #1;
      lat++;
    end
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
    start(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, lat);
    check_int("latency", lat, 22);
    check("FIPS-197 C.1", cipher_txt, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    start(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, lat);
    check_int("latency", lat, 22);
    check("FIPS-197 A.1", cipher_txt, 128'h3925841d02dc09fbdc118597196a0b32);
    // continuous operation: new data each pass
    for (int n = 0; n < 30; n++) begin
      int gap;
      gap = 0;
      prev = cipher_txt;
      data = rand128();
      if (n % 3 == 0) key = rand128();
      do begin
        @(posedge clk); #1;
        gap++;
      end while (cipher_txt === prev && gap < 100);
      check_int("pass period", gap, 24);
      check($sformatf("pass %0d", n), cipher_txt, r_encrypt(data, key));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
