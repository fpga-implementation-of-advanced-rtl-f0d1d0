// tb_add_round_key: self-checking testbench of add_round_key.
//
// Random states and keys: with enable high the output must be state XOR key,
// computed here byte by byte; with enable low it must equal the state. Also
// checks the FIPS-197 C.1 first add-round-key. A watchdog ends a hung run.
module tb_add_round_key;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         enable;
  logic [127:0] data_in, w, data_out;
  int checks = 0, failures = 0;

  add_round_key dut (.enable, .data_in, .w, .data_out);

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  function automatic logic [127:0] xor_bytes(logic [127:0] a, logic [127:0] b);
    st_t sa = to_st(a), sb = to_st(b);
    foreach (sa[i]) sa[i] = sa[i] ^ sb[i];
    return from_st(sa);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1'b1;
    data_in = 128'h00112233445566778899aabbccddeeff;
    w = 128'h000102030405060708090a0b0c0d0e0f;
    @(posedge clk);
    check("FIPS-197 C.1 round 0", data_out, 128'h00102030405060708090a0b0c0d0e0f0);
    for (int n = 0; n < 300; n++) begin
      data_in = rand128(); w = rand128(); enable = 1'b1;
      @(posedge clk);
      check("xor", data_out, xor_bytes(data_in, w));
      enable = 1'b0;
      @(posedge clk);
      check("bypass", data_out, data_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
