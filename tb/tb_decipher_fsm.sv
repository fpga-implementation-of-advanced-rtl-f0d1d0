// tb_decipher_fsm: self-checking testbench of decipher_fsm.
//
// The testbench drives rnd_in directly. It tracks the state the controller
// should be in from the state graph (INIT -> S0 on go_i; from S0: round 10 -> S1, above 10 -> S4, 0 -> S3, otherwise S2;
// S1..S4 -> S0) and checks every clock that all outputs match that
// state's row of the control table, including rnd_out (the INIT/S4 value,
// or rnd_in elsewhere). It checks that INIT waits while go_i is low, visits
// every state many times with random round values, and applies a reset in
// the middle. A watchdog ends a hung run.
module tb_decipher_fsm;
  logic       clk = 1'b0, reset, go_i;
  logic [3:0] rnd_in, rnd_out, load_reg, sel;
  logic       count_en, load_rgk, sline;
  logic go = 1'b0;
  int checks = 0, failures = 0;
  int visits [string];

  decipher_fsm dut (
    .clk, .reset, .go_i, .rnd_in, .load_reg, .rnd_out, .sel, .count_en, 
    .load_rgk, .sline
  );

  always #5 clk = ~clk;

  function automatic string branch(int r);
    if (r == 10) return "S1";
    if (r > 10) return "S4";
    if (r == 0) return "S3";
    return "S2";
  endfunction

  task automatic check_outputs(string st);
    logic [11:0] exp, got;
    logic [3:0]  exp_rnd;
    unique case (st)
      "INIT": exp = {4'b0000, 4'b0000, 1'b0, 1'b0, 1'b0, 1'b0};
      "S0":   exp = {4'b0000, 4'b0000, 1'b0, 1'b0, 1'b1, 1'b0};
      "S1":   exp = {4'b0010, 4'b0001, 1'b0, 1'b1, 1'b0, 1'b0};
      "S2":   exp = {4'b1111, 4'b0001, 1'b1, 1'b1, 1'b0, 1'b0};
      "S3":   exp = {4'b1110, 4'b0011, 1'b1, 1'b1, 1'b0, 1'b0};
      default: exp = {4'b0000, 4'b0000, 1'b1, 1'b0, 1'b0, 1'b0};
    endcase
    got = {sel, load_reg, sline, count_en, load_rgk, 1'b0};
    exp_rnd = (st == "INIT" || st == "S4") ? 4'd10 : rnd_in;
    checks++;
    if (got !== exp || rnd_out !== exp_rnd) begin
      failures++;
      $display("FAIL state %s: outputs %b rnd_out %0d, expected %b rnd_out %0d",
               st, got, rnd_out, exp, exp_rnd);
    end
    if (visits.exists(st)) visits[st]++; else visits[st] = 1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string st;
    reset = 1'b1; go_i = 1'b0; rnd_in = 4'd0;
    @(posedge clk); #1;
    reset = 1'b0;
    st = "INIT";
    for (int n = 0; n < 5; n++) begin   // INIT waits for go_i
      rnd_in = 4'($urandom);
      #1 check_outputs(st);
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      rnd_in = ($urandom_range(0, 3) == 0) ? 4'($urandom_range(11, 15)) : 4'($urandom_range(0, 10));
      go_i = $urandom_range(0, 1) == 1;
      #1 check_outputs(st);
      if (n == 1500) begin
        reset = 1'b1;
        @(posedge clk); #1;
        reset = 1'b0;
        st = "INIT";
        continue;
      end
      @(posedge clk); #1;
      if (st == "INIT") st = go_i ? "S0" : "INIT";
      else if (st == "S0") st = branch(int'(rnd_in));
      else st = "S0";
    end
    foreach (visits[s]) $display("state %s visited %0d times", s, visits[s]);
    if (visits.num() != 6) begin
      failures++;
      $display("FAIL not every state was visited");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
