// tb_csrl_stage: checks one scanner shift-register stage against a reference
// model: the first half-phase loads d on the rising edge when enabled (cleared
// by rst), the output follows the first half-phase on the falling edge.
module tb_csrl_stage;
  logic clk = 0, rst, en, d, q_first, q;
  int checks = 0, failures = 0;
  logic exp_first, exp_q;

  csrl_stage dut (.clk(clk), .rst(rst), .en(en), .d(d), .q_first(q_first), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 1; d = 0;
    @(posedge clk); #1;
    @(negedge clk); #1;
    exp_first = 0; exp_q = 0;
    check(q_first, exp_first, "q_first after reset");
    check(q, exp_q, "q after reset");
    for (int n = 0; n < 2000; n++) begin
      rst = ($urandom_range(0, 15) == 0);
      en  = ($urandom_range(0, 3) != 0);
      d   = 1'($urandom);
      // rising edge: first half-phase takes d, the output holds
      if (rst)     exp_first = 0;
      else if (en) exp_first = d;
      @(posedge clk); #1;
      check(q_first, exp_first, "q_first after rising edge");
      check(q, exp_q, "q holds through clock high");
      // falling edge: the output takes the first half-phase
      exp_q = exp_first;
      @(negedge clk); #1;
      check(q, exp_q, "q after falling edge");
      check(q_first, exp_first, "q_first holds through clock low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
