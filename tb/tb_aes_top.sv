// tb_aes_top: end-to-end testbench of aes_top at its default configuration.
//
// Each operation: reset, wait with go_i low, pulse go_i, then check that
// go_d and cipher_txt appear 22 clocks after the go_i edge and decipher_txt
// 45 clocks after it, against the reference model (FIPS-197 C.1 and A.1
// first, then random data and keys). While both halves keep cycling, new
// data is applied and the next cipher/decipher pair is checked. One run
// asserts reset in the middle of an encryption and checks that everything
// returns to its idle values. The testbench counts how often each mechanism
// happened and fails if one never did: the cipher and decipher controller
// states S1..S4, the decipher waiting in INIT for go_d, the restart of the
// round count (S4) followed by a new pass on new data, and the mid-run reset.
// A watchdog ends a hung run.
module tb_aes_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, reset, go_i, go_d;
  logic [127:0] data, key, cipher_txt, decipher_txt;
  logic [3:0]   dec_rnd;
  int checks = 0, failures = 0;
  int c_st [6], d_st [6];
  int dec_wait = 0, repass = 0, mid_reset = 0;

  aes_top dut (.clk, .reset, .go_i, .data, .key, .cipher_txt, .decipher_txt, .go_d, .dec_rnd);

  always #5 clk = ~clk;

  // mechanism counters, sampled every clock
  always @(posedge clk) begin
    c_st[int'(dut.u_cipher.u_fsm.state)]++;
    d_st[int'(dut.u_decipher.u_fsm.state)]++;
    if (!reset && dut.u_cipher.u_fsm.state != ST_INIT && dut.u_decipher.u_fsm.state == ST_INIT)
      dec_wait++;
  end

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

  task automatic do_reset();
    reset = 1'b1; go_i = 1'b0;
    @(posedge clk); #1;
    reset = 1'b0;
  endtask

  task automatic operation(logic [127:0] pt, logic [127:0] k);
    int t = 0, t_c = -1, t_d = -1;
    logic [127:0] ct = r_encrypt(pt, k);
    do_reset();
    data = pt; key = k;
    repeat (3) @(posedge clk);
    #1;
    check("cipher idle before go_i", cipher_txt, '0);
    check("decipher idle before go_i", decipher_txt, '0);
    go_i = 1'b1;
    @(posedge clk); #1;
    go_i = 1'b0;
    while ((t_c < 0 || t_d < 0) && t < 200) begin
      @(posedge clk); #1;
      t++;
      if (t_c < 0 && go_d) t_c = t;
      if (t_d < 0 && decipher_txt === pt) t_d = t;
    end
    check_int("cipher latency", t_c, 22);
    check_int("decipher latency", t_d, 45);
    check("cipher text", cipher_txt, ct);
    check("deciphered text", decipher_txt, pt);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pt2, k;
    int t;
    foreach (c_st[i]) begin c_st[i] = 0; d_st[i] = 0; end
    data = '0; key = '0;
    do_reset();
    operation(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    check("FIPS-197 C.1 cipher", cipher_txt, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    operation(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    check("FIPS-197 A.1 cipher", cipher_txt, 128'h3925841d02dc09fbdc118597196a0b32);
    for (int n = 0; n < 10; n++) begin
      k = rand128();
      operation(rand128(), k);
      // continuous mode: next pass on new data, same key
      pt2 = rand128();
      data = pt2;
      t = 0;
      while (decipher_txt !== pt2 && t < 200) begin
        @(posedge clk); #1;
        t++;
      end
      check("next pass cipher text", cipher_txt, r_encrypt(pt2, k));
      check("next pass deciphered text", decipher_txt, pt2);
      if (decipher_txt === pt2) repass++;
    end
    // reset in the middle of an encryption
    do_reset();
    data = rand128(); key = rand128();
    go_i = 1'b1;
    @(posedge clk); #1;
    go_i = 1'b0;
    repeat (9) @(posedge clk);
    #1;
    reset = 1'b1;
    @(posedge clk); #1;
    reset = 1'b0;
    mid_reset++;
    check("cipher cleared by reset", cipher_txt, '0);
    check_int("go_d cleared by reset", int'(go_d), 0);
    check_int("decipher round count back to 10", int'(dec_rnd), 10);
    repeat (30) @(posedge clk);
    #1;
    check("stays idle after reset", cipher_txt, '0);
    operation(rand128(), rand128());

    $display("cipher states   INIT %0d S0 %0d S1 %0d S2 %0d S3 %0d S4 %0d",
             c_st[0], c_st[1], c_st[2], c_st[3], c_st[4], c_st[5]);
    $display("decipher states INIT %0d S0 %0d S1 %0d S2 %0d S3 %0d S4 %0d",
             d_st[0], d_st[1], d_st[2], d_st[3], d_st[4], d_st[5]);
    $display("decipher waiting for go_d %0d clocks, new passes %0d, mid-run resets %0d",
             dec_wait, repass, mid_reset);
    for (int s = 2; s <= 5; s++) begin
      checks += 2;
      if (c_st[s] == 0) begin failures++; $display("FAIL cipher state %0d never reached", s); end
      if (d_st[s] == 0) begin failures++; $display("FAIL decipher state %0d never reached", s); end
    end
    checks += 3;
    if (dec_wait == 0)  begin failures++; $display("FAIL decipher never waited"); end
    if (repass == 0)    begin failures++; $display("FAIL no second pass"); end
    if (mid_reset == 0) begin failures++; $display("FAIL no mid-run reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
