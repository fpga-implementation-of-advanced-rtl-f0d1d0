// tb_state_reg: self-checking testbench of state_reg at its 128-bit
// default width. A random load/reset sequence is compared clock by clock
// with a model register kept in the testbench. A watchdog ends a hung run.
module tb_state_reg;
  logic         clk = 1'b0, reset, load;
  logic [127:0] d, q, model;
  int checks = 0, failures = 0;

  state_reg dut (.clk, .reset, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; load = 1'b0; d = '0; model = '0;
    @(posedge clk); #1;
    for (int n = 0; n < 500; n++) begin
      reset = ($urandom_range(0, 19) == 0);
      load  = $urandom_range(0, 1) == 1;
      d     = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk); #1;
      if (reset) model = '0;
      else if (load) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d: q %032h model %032h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
