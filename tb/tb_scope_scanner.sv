// tb_scope_scanner: an 8-pixel oscilloscope scanner with known pixel
// currents. After a clear, a reference model of the selected pixel is followed
// clock by clock, with random clock stopping and occasional new pixel values;
// checked are the selected pixel, the sync trigger (one clock per scan, scan
// period N+1), the sense output Vref + I*R of the selected pixel and the
// reference-wire current of all the others.
module tb_scope_scanner;
  import scanner_pkg::*;
  localparam int N = 8;
  localparam longint VREF = 1000000, R = 1000000;  // the scanner's sense amplifier defaults
  logic clk = 0, rst = 1, en = 1;
  current_pa_t [N-1:0] pix;
  logic [N-1:0] sel;
  logic sync;
  current_pa_t i_ref;
  voltage_uv_t v_out;
  int checks = 0, failures = 0;
  int pos = -1, syncs = 0, stops = 0, last_sync = -1, t = 0;

  scope_scanner #(.N(N)) dut (.clk(clk), .rst(rst), .en(en), .pix_pa(pix),
                              .sel(sel), .sync(sync), .i_ref_pa(i_ref), .v_out_uv(v_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_pixels();
    for (int i = 0; i < N; i++) pix[i] = $signed($urandom_range(0, 400000)) - 100000;
  endtask

  initial begin
    longint total, isel;
    new_pixels();
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1500; n++) begin
      en = (n < 5*(N+1)) ? 1'b1 : ($urandom_range(0, 4) != 0);
      if (!en) stops++;
      if (n % 97 == 0) new_pixels();
      // while the clock is high the output still shows the previous pixel
      @(posedge clk); #1;
      isel = (pos >= 0) ? longint'(pix[pos]) : 0;
      checks++;
      if (v_out != VREF + isel * R / 1000000) begin failures++; $display("FAIL vout in clock high, pos %0d", pos); end
      @(negedge clk); #1;
      t++;
      if (en) pos = (pos == N-1) ? -1 : pos + 1;
      total = 0;
      for (int i = 0; i < N; i++) total += pix[i];
      isel = (pos >= 0) ? longint'(pix[pos]) : 0;
      checks += 4;
      if (sel !== ((pos < 0) ? '0 : N'(1) << pos)) begin failures++; $display("FAIL sel %b pos %0d", sel, pos); end
      if (sync !== (pos < 0)) begin failures++; $display("FAIL sync pos %0d", pos); end
      if (v_out != VREF + isel * R / 1000000) begin failures++; $display("FAIL vout %0d pos %0d", v_out, pos); end
      if (i_ref != total - isel) begin failures++; $display("FAIL iref %0d", i_ref); end
      if (sync && n < 5*(N+1)) begin
        if (last_sync >= 0) begin
          checks++;
          if (t - last_sync != N+1) begin failures++; $display("FAIL period %0d", t - last_sync); end
        end
        last_sync = t;
      end
      if (sync && en) syncs++;
    end
    checks++;
    if (syncs < 10 || stops == 0) begin failures++; $display("FAIL mechanisms syncs=%0d stops=%0d", syncs, stops); end
    $display("mechanisms: sync_pulses=%0d clock_stops=%0d", syncs, stops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
