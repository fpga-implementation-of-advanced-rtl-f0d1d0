// tb_up_counter: self-checking testbench of up_counter at its
// defaults (4 bits). Random enable/input/reset sequences are compared clock
// by clock with a model: reset gives 0, enable gives input + 1 modulo 16,
// otherwise the input is loaded. A watchdog ends a hung run.
module tb_up_counter;
  logic       clk = 1'b0, reset, enable;
  logic [3:0] cnt_in, cnt_out, model;
  int checks = 0, failures = 0;

  up_counter dut (.clk, .reset, .enable, .cnt_in, .cnt_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; enable = 1'b0; cnt_in = 4'd0;
    @(posedge clk); #1;
    checks++;
    if (cnt_out !== 4'd0) begin failures++; $display("FAIL reset value %0d", cnt_out); end
    reset = 1'b0;
    for (int n = 0; n < 600; n++) begin
      reset  = ($urandom_range(0, 29) == 0);
      enable = $urandom_range(0, 1) == 1;
      cnt_in = (n % 3 == 0) ? 4'($urandom) : cnt_out;   // mostly count from the output
      if (reset) model = 4'd0;
      else if (enable) model = (cnt_in + 4'd1) % 16;
      else model = cnt_in;
      @(posedge clk); #1;
      checks++;
      if (cnt_out !== model) begin
        failures++;
        $display("FAIL step %0d: out %0d model %0d", n, cnt_out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
