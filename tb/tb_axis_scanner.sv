// tb_axis_scanner: a small video axis scanner (6 display stages, 5 blank
// stages, sync on blank stages 2..3) is cleared and then followed by a
// reference model of the bit position. Every clock the display selects,
// blank, sync and odd-row outputs are compared with values derived from the
// position; the scan length, blank length and sync length are counted per
// scan, including scans with the clock stopped at random.
module tb_axis_scanner;
  localparam int D = 6, B = 5, SF = 2, SL = 3, N = D + B;
  logic clk = 0, rst = 1, en = 1;
  logic [D-1:0] sel, sel_first;
  logic sync, blank, odd;
  int checks = 0, failures = 0;
  int pos = -1;
  int scans = 0, sync_pulses = 0, stops = 0;
  int run_len = 0, blank_len = 0, sync_len = 0;

  axis_scanner #(.DISPLAY(D), .BLANK(B), .SYNC_FIRST(SF), .SYNC_LAST(SL)) dut (
    .clk(clk), .rst(rst), .en(en), .sel(sel), .sel_first(sel_first), .sync(sync), .blank(blank), .odd(odd));

  always #5 clk = ~clk;

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b expected %0b pos %0d at %0t", what, got, exp, pos, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0] exp_sel;
    logic sync_q = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 40*(N+1); n++) begin
      en = (n < 10*(N+1)) ? 1'b1 : ($urandom_range(0, 4) != 0);
      if (!en) stops++;
      @(negedge clk); #1;
      if (en) begin
        pos = (pos == N-1) ? -1 : pos + 1;
        // per-scan interval lengths, measured in advancing clocks
        run_len++;
        if (blank) blank_len++;
        if (sync) sync_len++;
        if (pos == -1) begin
          checks += 3;
          if (run_len != N+1) begin failures++; $display("FAIL scan length %0d", run_len); end
          if (blank_len != B+1) begin failures++; $display("FAIL blank length %0d", blank_len); end
          if (sync_len != SL-SF+1 && scans > 0) begin failures++; $display("FAIL sync length %0d", sync_len); end
          if (scans == 0) checks -= 1;
          scans++;
          run_len = 0; blank_len = 0; sync_len = 0;
        end
      end
      exp_sel = (pos >= 0 && pos < D) ? D'(1) << pos : '0;
      checks++;
      if (sel !== exp_sel) begin failures++; $display("FAIL sel %b expected %b", sel, exp_sel); end
      expect_bit(blank, !(pos >= 0 && pos < D), "blank");
      expect_bit(sync, pos >= D+SF-1 && pos <= D+SL-1, "sync");
      expect_bit(odd, pos >= 0 && pos < D && (pos % 2) == 0, "odd");
      if (sync && !sync_q) sync_pulses++;
      sync_q = sync;
    end
    checks++;
    if (scans < 20 || sync_pulses < 20 || stops == 0) begin
      failures++; $display("FAIL mechanisms: scans=%0d syncs=%0d stops=%0d", scans, sync_pulses, stops);
    end
    $display("mechanisms: scans=%0d sync_pulses=%0d clock_stops=%0d", scans, sync_pulses, stops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
