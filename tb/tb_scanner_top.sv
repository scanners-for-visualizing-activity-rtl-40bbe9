// tb_scanner_top: end-to-end run of both scanners at their default sizes.
//
// Sync pins are active low; the checks below use their inverses.
// Video scanner (43 x 68 pixels, each row on six lines, clocked by the
// 1.8 MHz oscillator model): a modelled pixel array answers the row select
// with its column currents. After a reset the testbench watches two complete
// frames and checks, from the outputs alone: columns are selected in order,
// one per clock, 43 per line and only outside hblank; rows in order, six lines
// each, 68 per frame, only outside vblank; the row bias follows the row; the
// sense voltage matches the logarithmic law for the addressed pixel; the video
// is blanked in both blank intervals. The measured timing is held against the
// multiscan monitor limits: 200..700 lines per frame, vertical rate 60 +- 15 Hz,
// horizontal blank 33 +- 7 % and vertical blank 20 +- 10 % of display. The scan
// is then stopped and must freeze.
// Oscilloscope scanner (50 pixels) runs at the same time on its own clock; its
// selected pixel, trigger and sense output are checked.
// Mechanisms counted (a failure if one never happens): hsync, vsync, row
// advance, hblank, vblank, scan stop, scope sync, scope scan stop.
module tb_scanner_top;
  import scanner_pkg::*;
  localparam int C = 43, R = 68, SP = 50;
  logic xtal_out, clk, rst = 1, scan_en = 1;
  current_pa_t [C-1:0] col_i;
  logic [R-1:0] row_sel, row_sel_n;
  voltage_uv_t [R-1:0] row_bias;
  logic [C-1:0] col_sel;
  logic hsync_n, vsync_n, hsync, hblank, vsync, vblank;
  assign hsync = ~hsync_n;
  assign vsync = ~vsync_n;
  voltage_uv_t sense, video;
  logic scope_clk = 0, scope_en = 1;
  current_pa_t [SP-1:0] scope_pix;
  logic [SP-1:0] scope_sel;
  logic scope_sync;
  voltage_uv_t scope_v;
  int checks = 0, failures = 0;

  scanner_top dut (
    .xtal_in(xtal_out), .xtal_out(xtal_out), .clk_out(clk), .rst(rst), .scan_en(scan_en),
    .col_current_pa(col_i), .row_sel(row_sel), .row_sel_n(row_sel_n), .row_bias_uv(row_bias), .col_sel(col_sel),
    .hsync_n(hsync_n), .hblank(hblank), .vsync_n(vsync_n), .vblank(vblank), .sense_uv(sense), .video_uv(video),
    .scope_clk(scope_clk), .scope_en(scope_en), .scope_pix_pa(scope_pix),
    .scope_sel(scope_sel), .scope_sync(scope_sync), .scope_vout_uv(scope_v));

  always #7 scope_clk = ~scope_clk;

  function automatic current_pa_t pixel(int r, int c);
    return current_pa_t'(500 + 37 * ((r * 131 + c * 17) % 2000));
  endfunction

  function automatic int index_of(logic [127:0] v, int n);
    int k = -1;
    for (int i = 0; i < n; i++) if (v[i]) k = i;
    return k;
  endfunction

  function automatic int ones(logic [127:0] v);
    return $countones(v);
  endfunction

  always_comb begin
    for (int c = 0; c < C; c++)
      col_i[c] = (index_of(128'(row_sel), R) >= 0) ? pixel(index_of(128'(row_sel), R), c) : '0;
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real sense_of(longint i);
    real x = (i > 0) ? real'(i) * 1000.0 : 1.0;
    return (1.0e6 + 25852.0 * $ln(x)) / 0.7;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", msg, $time);
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- video scanner ----------------
  int n_hsync = 0, n_vsync = 0, n_row_adv = 0, n_hblank = 0, n_vblank = 0, n_stop = 0;
  int n_scope_sync = 0, n_scope_stop = 0;
  bit video_done = 0, scope_done = 0;

  initial begin
    int col_expect, row_cur, row_prev, lines_this_row, cols_this_line;
    int lines, disp_lines, line_clocks, disp_clocks, frames, line_len;
    logic hsync_q, vsync_q, hblank_q, vblank_q;
    realtime t_vs;
    real rate;
    logic [C-1:0] held;
    repeat (3) @(negedge clk);
    @(negedge scope_clk);   // release the reset between clock edges of both scanners
    rst = 0;
    // wait for the first vertical sync, then measure two frames
    @(posedge vsync);
    t_vs = $realtime;
    hsync_q = 1; vsync_q = 1; hblank_q = hblank; vblank_q = vblank;
    col_expect = 0; row_prev = -1; row_cur = -1; lines_this_row = 0; cols_this_line = 0;
    lines = 0; disp_lines = 0; line_clocks = 0; disp_clocks = 0; frames = 0; line_len = 0;
    while (frames < 2) begin
      @(negedge clk); #1;
      line_clocks++;
      // one selected column at most, only while not blanked, in order
      checks++;
      if (hblank && col_sel != 0) fail("column selected during horizontal blank");
      if (hblank || vblank) begin
        checks++;
        if (video != 0) fail("video not blanked");
      end
      if (!hblank) begin
        if (col_sel !== C'(1) << col_expect) fail($sformatf("column %0d expected", col_expect));
        col_expect++; cols_this_line++;
        if (!vblank) disp_clocks++;
      end
      // row select: one row outside vblank, none inside
      checks++;
      if (vblank ? (row_sel != 0) : (ones(128'(row_sel)) != 1)) fail("row select");
      checks++;
      if (row_sel_n !== ~row_sel) fail("complementary row select");
      row_cur = index_of(128'(row_sel), R);
      if (row_cur >= 0) begin
        checks++;
        if (row_bias[row_cur] != 800000) fail("row bias");
        if (!hblank) begin
          checks++;
          if (fabs(real'(sense) - sense_of(longint'(pixel(row_cur, col_expect - 1)))) > 3000.0) fail("sense voltage");
        end
      end
      if (hblank && !hblank_q) begin
        n_hblank++;
        checks++;
        if (cols_this_line != C) fail($sformatf("%0d columns in a line", cols_this_line));
        cols_this_line = 0; col_expect = 0;
      end
      if (vblank && !vblank_q) n_vblank++;
      if (hsync && !hsync_q) begin
        n_hsync++; lines++;
        if (!vblank) disp_lines++;
        lines_this_row++;
        if (line_clocks > 0 && line_clocks < 1000) line_len = line_clocks;
        line_clocks = 0;
      end
      if (row_cur != row_prev) begin
        if (row_cur >= 0) begin
          n_row_adv++;
          checks++;
          if (row_cur != row_prev + 1) fail($sformatf("row %0d after %0d", row_cur, row_prev));
          if (row_prev >= 0) begin
            checks++;
            if (lines_this_row != 6) fail($sformatf("row shown on %0d lines", lines_this_row));
          end
        end
        lines_this_row = 0;
        row_prev = row_cur;
      end
      if (vsync && !vsync_q) begin
        frames++;
        rate = 1.0 / (($realtime - t_vs) / 1s);
        t_vs = $realtime;
        n_vsync++;
        $display("frame: %0d lines (%0d displayed), %0d display clocks, vertical rate %0.2f Hz", lines, disp_lines, disp_clocks, rate);
        checks += 6;
        if (lines < 200 || lines > 700) fail("lines per frame outside 200..700");
        if (rate < 45.0 || rate > 75.0) fail("vertical rate outside 60 +- 15 Hz");
        if (disp_lines != R * 6) fail("display lines");
        if (real'(lines - disp_lines) / disp_lines < 0.10 || real'(lines - disp_lines) / disp_lines > 0.30) fail("vertical blank ratio");
        if (disp_clocks != disp_lines * C) fail("display clocks per frame");
        if (real'(line_len - C) / C < 0.26 || real'(line_len - C) / C > 0.40) fail("horizontal blank ratio");
        $display("  line %0d clocks, horizontal blank %0.1f %% of display, vertical blank %0.1f %% of display",
                 line_len, 100.0 * real'(line_len - C) / C, 100.0 * real'(lines - disp_lines) / disp_lines);
        lines = 0; disp_lines = 0; disp_clocks = 0; row_prev = -1;
      end
      hsync_q = hsync; vsync_q = vsync; hblank_q = hblank; vblank_q = vblank;
    end
    // freeze
    scan_en = 0;
    @(negedge clk); #1;
    held = col_sel;
    repeat (200) begin
      @(negedge clk); #1;
      checks++; n_stop++;
      if (col_sel !== held || hsync !== hsync_q) fail("scan did not stop");
    end
    video_done = 1;
  end

  // ---------------- oscilloscope scanner ----------------
  initial begin
    int pos = -1;
    for (int i = 0; i < SP; i++) scope_pix[i] = current_pa_t'(1000 * i - 20000);
    wait (!rst);
    for (int n = 0; n < 40 * (SP + 1); n++) begin
      scope_en = (n < 10 * (SP + 1)) || ($urandom_range(0, 5) != 0);
      if (!scope_en) n_scope_stop++;
      @(negedge scope_clk); #1;
      if (scope_en) pos = (pos == SP - 1) ? -1 : pos + 1;
      checks += 3;
      if (scope_sel !== ((pos < 0) ? '0 : SP'(1) << pos)) fail("scope select");
      if (scope_sync !== (pos < 0)) fail("scope sync");
      if (scope_v != 1000000 + ((pos < 0) ? 0 : scope_pix[pos])) fail("scope sense output");
      if (scope_sync && scope_en) n_scope_sync++;
    end
    scope_done = 1;
  end

  initial begin
    wait (video_done && scope_done);
    checks++;
    if (n_hsync == 0 || n_vsync == 0 || n_row_adv == 0 || n_hblank == 0 || n_vblank == 0 || n_stop == 0 ||
        n_scope_sync == 0 || n_scope_stop == 0) fail("a mechanism never happened");
    $display("mechanisms: hsync=%0d vsync=%0d row_advance=%0d hblank=%0d vblank=%0d scan_stop=%0d scope_sync=%0d scope_stop=%0d",
             n_hsync, n_vsync, n_row_adv, n_hblank, n_vblank, n_stop, n_scope_sync, n_scope_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
