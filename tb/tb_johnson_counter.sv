// tb_johnson_counter: three-stage and four-stage Johnson counters are cleared
// and stepped at random; the state is compared with the published sequence
// (three stages: 000 100 110 111 011 001, first stage first) or its
// generalisation, and the vertical-clock strobe must come exactly once every
// 2N steps, on the step where the last stage rises.
module tb_johnson_counter;
  logic clk = 0, rst = 1, step = 0;
  logic [2:0] s3;
  logic [3:0] s4;
  logic r3, r4;
  int checks = 0, failures = 0;
  int k3 = 0, k4 = 0, rises3 = 0, rises4 = 0;

  johnson_counter #(.N(3)) u3 (.clk(clk), .rst(rst), .step(step), .state(s3), .vclk_rise(r3));
  johnson_counter #(.N(4)) u4 (.clk(clk), .rst(rst), .step(step), .state(s4), .vclk_rise(r4));

  always #5 clk = ~clk;

  // State after k steps from zero: stage i (0-based) is 1 for i < k (k <= N)
  // and for i >= k-N (k > N).
  function automatic logic [7:0] johnson(int n, int k);
    logic [7:0] v = '0;
    k = k % (2*n);
    for (int i = 0; i < n; i++) v[i] = (k <= n) ? (i < k) : (i >= k - n);
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the published three-stage sequence
    checks++;
    if (johnson(3,1) != 8'b001 || johnson(3,2) != 8'b011 || johnson(3,4) != 8'b110 || johnson(3,5) != 8'b100) begin
      failures++; $display("FAIL reference sequence");
    end
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      step = 1'($urandom);
      #1;
      checks += 2;
      if (r3 !== (step && (k3 % 6) == 2)) begin failures++; $display("FAIL rise3 k=%0d", k3); end
      if (r4 !== (step && (k4 % 8) == 3)) begin failures++; $display("FAIL rise4 k=%0d", k4); end
      if (r3) rises3++;
      if (r4) rises4++;
      @(negedge clk);
      if (step) begin k3++; k4++; end
      checks += 2;
      if (s3 !== johnson(3, k3)[2:0]) begin failures++; $display("FAIL s3 %b k=%0d", s3, k3); end
      if (s4 !== johnson(4, k4)[3:0]) begin failures++; $display("FAIL s4 %b k=%0d", s4, k4); end
    end
    checks += 2;
    if (rises3 != (k3 + 3) / 6) begin failures++; $display("FAIL rise count 3: %0d of %0d steps", rises3, k3); end
    if (rises4 != (k4 + 4) / 8) begin failures++; $display("FAIL rise count 4: %0d of %0d steps", rises4, k4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
