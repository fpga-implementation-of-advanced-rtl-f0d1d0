// tb_cipher_datapath: self-checking testbench of cipher_datapath.
//
// The testbench plays the controller. For each random plain text and key it
// steps through the rounds the way the control table does (load the round
// key, then process: round 0 add round key only, rounds 1..9 all four steps,
// round 10 without mix column), with the result register loaded in every
// processing step so that each intermediate state can be compared with the
// reference model. It also checks the round counter after every step, that
// the result register holds when not loaded, and the FIPS-197 C.1 vector.
// A watchdog ends a hung run.
module tb_cipher_datapath;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, reset;
  logic [127:0] data, key, cipher_txt;
  logic         sline, load_rgk, count_en;
  logic [3:0]   sel, load_reg, rnd_in, rnd_out;
  int checks = 0, failures = 0;

  cipher_datapath dut (
    .clk, .reset, .data, .key, .sline, .sel, .load_reg, .load_rgk, .count_en,
    .rnd_in, .rnd_out, .cipher_txt
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic idle();
    sline = 1'b0; sel = '0; load_reg = '0; load_rgk = 1'b0; count_en = 1'b0;
  endtask

  task automatic run(logic [127:0] pt, logic [127:0] k);
    logic [127:0] s = pt;
    data = pt; key = k;
    for (int r = 0; r <= 10; r++) begin
      idle(); load_rgk = 1'b1; rnd_in = rnd_out;           // select step
      @(posedge clk); #1;
      idle(); count_en = 1'b1; rnd_in = rnd_out; load_reg = 4'b0011;
      sline = (r != 0);
      sel = (r == 0) ? 4'b0001 : (r == 10) ? 4'b1101 : 4'b1111;
      @(posedge clk); #1;
      if (r != 0) begin
        s = r_shift(r_sub(s, 0), 0);
        if (r != 10) s = r_mix(s, 0);
      end
      s ^= r_round_key(k, r);
      check($sformatf("state after round %0d", r), cipher_txt, s);
      checks++;
      if (rnd_out !== 4'(r + 1)) begin
        failures++;
        $display("FAIL counter after round %0d: %0d", r, rnd_out);
      end
    end
    check("final cipher text", cipher_txt, r_encrypt(pt, k));
    idle(); rnd_in = 4'd0;                                  // restart step
    data = rand128();
    @(posedge clk); #1;
    check("result register holds", cipher_txt, r_encrypt(pt, k));
    checks++;
    if (rnd_out !== 4'd0) begin failures++; $display("FAIL counter restart"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; idle(); rnd_in = '0; data = '0; key = '0;
    @(posedge clk); #1;
    reset = 1'b0;
    check("reset clears result", cipher_txt, '0);
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    check("FIPS-197 C.1", cipher_txt, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int n = 0; n < 20; n++) run(rand128(), rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
