// tb_scan_register: starts an 8-stage scan register from its random power-up
// state without reset and checks that it settles to a single selected bit by
// itself; then follows a reference model of the bit position (0..N-1, or none
// for the one empty clock) with random clock stopping, checks the scan period
// of N+1 clocks, the sync (empty) output, the first half-phase outputs and the
// synchronous clear.
module tb_scan_register;
  localparam int N = 8;
  logic clk = 0, rst = 0, en = 1;
  logic [N-1:0] sel, sel_first;
  logic empty;
  int checks = 0, failures = 0;
  int pos;                 // expected position, -1 = no stage selected
  int self_init = 0, stops = 0, periods_ok = 0;

  scan_register #(.N(N)) dut (.clk(clk), .rst(rst), .en(en), .sel(sel), .sel_first(sel_first), .empty(empty));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] onehot(int p);
    return (p < 0) ? '0 : (N'(1) << p);
  endfunction

  function automatic int next_pos(int p);
    return (p == N-1) ? -1 : p + 1;
  endfunction

  task automatic check_vec(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_empty, t;
    // Power-up without reset: after 2N+2 clocks at most one bit may remain.
    repeat (2*N+2) @(posedge clk);
    #1;
    checks++;
    if ($countones(sel) > 1) begin failures++; $display("FAIL: %b not settled", sel); end
    else self_init++;
    pos = -1;
    for (int i = 0; i < N; i++) if (sel[i]) pos = i;
    checks++;
    if (empty !== (pos < 0)) begin failures++; $display("FAIL empty after settling"); end

    // Free-running: period check on the sync output.
    last_empty = -1;
    for (t = 0; t < 6*(N+1); t++) begin
      @(negedge clk); #1;
      pos = next_pos(pos);
      check_vec(sel, onehot(pos), "sel free-running");
      if (empty) begin
        if (last_empty >= 0) begin
          checks++;
          if (t - last_empty != N+1) begin failures++; $display("FAIL period %0d", t - last_empty); end
          else periods_ok++;
        end
        last_empty = t;
      end
    end

    // Random clock stopping, with first half-phase checks.
    for (int n = 0; n < 600; n++) begin
      en = ($urandom_range(0, 3) != 0);
      if (!en) stops++;
      @(posedge clk); #1;
      check_vec(sel, onehot(pos), "sel holds while clock high");
      check_vec(sel_first, en ? onehot(next_pos(pos)) : onehot(pos), "first half-phase");
      @(negedge clk); #1;
      if (en) pos = next_pos(pos);
      check_vec(sel, onehot(pos), "sel after falling edge");
      checks++;
      if (empty !== (pos < 0)) begin failures++; $display("FAIL empty at pos %0d", pos); end
    end
    en = 1;

    // Synchronous clear, then a new bit enters two clocks later.
    @(negedge clk);
    rst = 1;
    @(negedge clk); #1;
    rst = 0;
    check_vec(sel, '0, "cleared");
    @(negedge clk); #1;
    check_vec(sel, onehot(0), "new bit after clear");

    checks++;
    if (self_init == 0 || stops == 0 || periods_ok < 4) begin
      failures++; $display("FAIL mechanisms: self_init=%0d stops=%0d periods=%0d", self_init, stops, periods_ok);
    end
    $display("mechanisms: self_init=%0d clock_stops=%0d periods=%0d", self_init, stops, periods_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
