// tb_crystal_oscillator: measures the period and duty cycle of the oscillator
// model at its default (1.8 MHz) and at 4 MHz, and checks that the crystal
// drive pin follows the clock.
module tb_crystal_oscillator;
  logic x1, c1, x2, c2;
  int checks = 0, failures = 0;

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  crystal_oscillator u_def (.xtal_in(1'b0), .xtal_out(x1), .clk(c1));
  crystal_oscillator #(.PERIOD_PS(250000)) u_4m (.xtal_in(1'b0), .xtal_out(x2), .clk(c2));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int which, input real exp_ps);
    realtime t0, t1, t2;
    for (int n = 0; n < 20; n++) begin
      if (which == 0) begin @(posedge c1); t0 = $realtime; @(negedge c1); t1 = $realtime; @(posedge c1); t2 = $realtime; end
      else            begin @(posedge c2); t0 = $realtime; @(negedge c2); t1 = $realtime; @(posedge c2); t2 = $realtime; end
      checks += 2;
      if (fabs((t2 - t0) / 1ps - exp_ps) > 2.0) begin failures++; $display("FAIL period %0f ps", (t2 - t0) / 1ps); end
      if (fabs((t1 - t0) / (t2 - t0) - 0.5) > 0.01) begin failures++; $display("FAIL duty"); end
    end
  endtask

  always @(c1 or x1) begin
    #1ps;
    checks++;
    if (x1 !== c1) begin failures++; $display("FAIL xtal_out does not follow clk"); end
  end

  initial begin
    measure(0, 555556.0);
    measure(1, 250000.0);
    $display("measured default frequency %0f MHz", 1.0e6 / 555556.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
