// tb_decipher_datapath: self-checking testbench of decipher_datapath.
//
// The testbench plays the controller, stepping rounds 10 down to 0 the way
// the control table does (load the round key, then process: round 10 add
// round key only, rounds 9..1 all four inverse steps, round 0 without
// inverse mix column). The result register is loaded in every processing
// step, so each intermediate state is compared with the reference model.
// The down counter is checked after every step, including its wrap to 15
// after round 0, as is the FIPS-197 C.1 vector. A watchdog ends a hung run.
module tb_decipher_datapath;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, reset;
  logic [127:0] cipher, key, decipher;
  logic         sline, load_rgk, count_en;
  logic [3:0]   sel, load_reg, rnd_in, rnd_out;
  int checks = 0, failures = 0;

  decipher_datapath dut (
    .clk, .reset, .cipher, .key, .sline, .sel, .load_reg, .load_rgk, .count_en,
    .rnd_in, .rnd_out, .decipher
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

  task automatic run(logic [127:0] ct, logic [127:0] k);
    logic [127:0] s = ct;
    cipher = ct; key = k;
    for (int r = 10; r >= 0; r--) begin
      idle(); load_rgk = 1'b1; rnd_in = rnd_out;
      @(posedge clk); #1;
      idle(); count_en = 1'b1; rnd_in = rnd_out; load_reg = 4'b0011;
      sline = (r != 10);
      sel = (r == 10) ? 4'b0010 : (r == 0) ? 4'b1110 : 4'b1111;
      @(posedge clk); #1;
      if (r != 10) s = r_sub(r_shift(s, 1), 1);
      s ^= r_round_key(k, r);
      if (r != 10 && r != 0) s = r_mix(s, 1);
      check($sformatf("state after round %0d", r), decipher, s);
      checks++;
      if (rnd_out !== 4'((r + 15) % 16)) begin
        failures++;
        $display("FAIL counter after round %0d: %0d", r, rnd_out);
      end
    end
    check("final plain text", decipher, r_decrypt(ct, k));
    idle(); rnd_in = 4'd10;
    @(posedge clk); #1;
    checks++;
    if (rnd_out !== 4'd10) begin failures++; $display("FAIL counter restart"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; idle(); rnd_in = 4'd10; cipher = '0; key = '0;
    @(posedge clk); #1;
    reset = 1'b0;
    checks++;
    if (rnd_out !== 4'd10) begin failures++; $display("FAIL reset count %0d", rnd_out); end
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f);
    check("FIPS-197 C.1", decipher, 128'h00112233445566778899aabbccddeeff);
    for (int n = 0; n < 20; n++) run(rand128(), rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
