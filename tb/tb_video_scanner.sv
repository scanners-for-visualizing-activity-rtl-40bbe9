// tb_video_scanner: a 5-column, 4-row video scanner (5 horizontal blank
// stages, 4 vertical blank stages, two-stage Johnson counter: 4 lines per row)
// scans a modelled pixel array, next to a copy built for a hexagonal array.
// Independent models of the horizontal position, of the line count and of the
// row position (advanced at the start of every 2N-th horizontal sync) predict,
// every clock: column and row selects, hsync/hblank/vsync/vblank, row bias,
// the logarithmic sense voltage of the addressed pixel and the blanked video
// level. The hexagonal copy must use the first half-phase on odd rows and the
// stage outputs on even rows. A third copy with two output channels scans a
// second signal per pixel: its first channel must match the single-channel
// copy and its second the sense and video levels of the second signal. Line,
// row and frame lengths are counted, and the scan is stopped once to check
// that it freezes.
module tb_video_scanner;
  import scanner_pkg::*;
  localparam int C = 5, R = 4, J = 2, HB = 5, HSF = 2, HSL = 4, VB = 4, VSF = 2, VSL = 3;
  localparam int HN = C + HB, VN = R + VB;
  logic clk = 0, rst = 1, scan_en = 1;
  current_pa_t [C-1:0] col_i, col_i_hex;
  logic [R-1:0] row_sel, row_sel_hex, row_sel_n, row_sel_n_hex;
  voltage_uv_t [R-1:0] row_bias, row_bias_hex;
  logic [C-1:0] col_sel, col_sel_hex;
  logic odd_row, odd_row_hex;
  logic hsync, hblank, vsync, vblank, hsync_x, hblank_x, vsync_x, vblank_x;
  voltage_uv_t sense, video, sense_x, video_x;
  int checks = 0, failures = 0;

  video_scanner #(.COLS(C), .ROWS(R), .JC_STAGES(J), .H_BLANK(HB), .H_SYNC_FIRST(HSF), .H_SYNC_LAST(HSL),
                  .V_BLANK(VB), .V_SYNC_FIRST(VSF), .V_SYNC_LAST(VSL), .HEX_ARRAY(1'b0)) dut (
    .clk(clk), .rst(rst), .scan_en(scan_en), .col_current_pa(col_i),
    .row_sel(row_sel), .row_sel_n(row_sel_n), .row_bias_uv(row_bias), .col_sel(col_sel), .odd_row(odd_row),
    .hsync(hsync), .hblank(hblank), .vsync(vsync), .vblank(vblank), .sense_uv(sense), .video_uv(video));

  video_scanner #(.COLS(C), .ROWS(R), .JC_STAGES(J), .H_BLANK(HB), .H_SYNC_FIRST(HSF), .H_SYNC_LAST(HSL),
                  .V_BLANK(VB), .V_SYNC_FIRST(VSF), .V_SYNC_LAST(VSL), .HEX_ARRAY(1'b1)) dut_hex (
    .clk(clk), .rst(rst), .scan_en(scan_en), .col_current_pa(col_i_hex),
    .row_sel(row_sel_hex), .row_sel_n(row_sel_n_hex), .row_bias_uv(row_bias_hex), .col_sel(col_sel_hex), .odd_row(odd_row_hex),
    .hsync(hsync_x), .hblank(hblank_x), .vsync(vsync_x), .vblank(vblank_x), .sense_uv(sense_x), .video_uv(video_x));

  // two-channel copy
  current_pa_t [1:0][C-1:0] col_i2;
  logic [R-1:0] row_sel2, row_sel_n2;
  voltage_uv_t [R-1:0] row_bias2;
  logic [C-1:0] col_sel2;
  logic odd2, hs2, hb2, vs2, vb2;
  voltage_uv_t [1:0] sense2, video2;

  video_scanner #(.COLS(C), .ROWS(R), .JC_STAGES(J), .H_BLANK(HB), .H_SYNC_FIRST(HSF), .H_SYNC_LAST(HSL),
                  .V_BLANK(VB), .V_SYNC_FIRST(VSF), .V_SYNC_LAST(VSL), .HEX_ARRAY(1'b0), .CHANNELS(2)) dut_2ch (
    .clk(clk), .rst(rst), .scan_en(scan_en), .col_current_pa(col_i2),
    .row_sel(row_sel2), .row_sel_n(row_sel_n2), .row_bias_uv(row_bias2), .col_sel(col_sel2), .odd_row(odd2),
    .hsync(hs2), .hblank(hb2), .vsync(vs2), .vblank(vb2), .sense_uv(sense2), .video_uv(video2));

  always #5 clk = ~clk;

  // Pixel array: the selected row drives its column currents.
  function automatic current_pa_t pixel(int r, int c);
    return current_pa_t'(200 + 3000 * (r * C + c) + 150 * c * c);
  endfunction

  function automatic current_pa_t pixel2(int r, int c);
    return current_pa_t'(90000 - 2000 * (r * C + c));
  endfunction

  function automatic int index_of(logic [31:0] v, int n);
    int k = -1;
    for (int i = 0; i < n; i++) if (v[i]) k = i;
    return k;
  endfunction

  always_comb begin
    for (int c = 0; c < C; c++) begin
      col_i[c]     = (index_of(32'(row_sel), R) >= 0) ? pixel(index_of(32'(row_sel), R), c) : '0;
      col_i_hex[c] = (index_of(32'(row_sel_hex), R) >= 0) ? pixel(index_of(32'(row_sel_hex), R), c) : '0;
      col_i2[0][c] = (index_of(32'(row_sel2), R) >= 0) ? pixel(index_of(32'(row_sel2), R), c) : '0;
      col_i2[1][c] = (index_of(32'(row_sel2), R) >= 0) ? pixel2(index_of(32'(row_sel2), R), c) : '0;
    end
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Sense amplifier defaults: Vref 1 V, I0 1 fA, kappa 0.7; video: gain 2,
  // reference 1.8 V, black 50 mV, full 1 V, blank 0 V.
  function automatic real sense_of(longint i);
    real x = (i > 0) ? real'(i) * 1000.0 : 1.0;
    if (x < 1.0) x = 1.0;
    return (1.0e6 + 25852.0 * $ln(x)) / 0.7;
  endfunction

  function automatic real video_of(real vs);
    real l = 50000.0 + 2.0 * (vs - 1800000.0);
    if (l < 50000.0) l = 50000.0;
    if (l > 1000000.0) l = 1000000.0;
    return l;
  endfunction

  task automatic bit_check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0b at %0t", what, got, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hp = -1, vp = -1, hsteps = 0;
  logic step_pending = 0;
  int line_clocks = 0, lines = 0, row_lines = 0, frame_lines = 0;
  int hsyncs = 0, vsyncs = 0, frames = 0, row_changes = 0, hex_odd = 0, hex_even = 0, freezes = 0, ch2_seen = 0;

  initial begin
    logic [C-1:0] exp_col, held;
    logic [R-1:0] exp_row;
    logic hsync_q = 0, vsync_q = 0;
    int cur_row, t_line = 0;
    real es;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3 * (VN + 1) * 2 * J * (HN + 1) + 20; n++) begin
      // first half of the clock: the hexagonal copy leads by half a clock on odd rows
      @(posedge clk); #1;
      if (vp >= 0 && vp < R && hp < C) begin
        exp_col = (hp + 1 < C && hp + 1 >= 0) ? C'(1) << (hp + 1) : '0;
        checks++;
        if ((vp % 2) == 0) begin
          hex_odd++;
          if (col_sel_hex !== exp_col) begin failures++; $display("FAIL hex odd row col %b exp %b", col_sel_hex, exp_col); end
        end else begin
          hex_even++;
          if (col_sel_hex !== col_sel) begin failures++; $display("FAIL hex even row col %b", col_sel_hex); end
        end
      end
      @(negedge clk); #1;
      // models
      hp = (hp == HN - 1) ? -1 : hp + 1;
      if (step_pending) begin
        if ((hsteps % (2 * J)) == J - 1) begin vp = (vp == VN - 1) ? -1 : vp + 1; row_changes++; end
        hsteps++;
        step_pending = 0;
      end
      if (hp == C + HSF - 1) step_pending = 1;   // hsync began on this clock
      exp_col = (hp >= 0 && hp < C) ? C'(1) << hp : '0;
      exp_row = (vp >= 0 && vp < R) ? R'(1) << vp : '0;
      checks += 2;
      if (col_sel !== exp_col) begin failures++; $display("FAIL col %b exp %b", col_sel, exp_col); end
      if (row_sel !== exp_row) begin failures++; $display("FAIL row %b exp %b", row_sel, exp_row); end
      checks++;
      if (row_sel_n !== ~exp_row) begin failures++; $display("FAIL row_sel_n %b", row_sel_n); end
      bit_check(hblank, !(hp >= 0 && hp < C), "hblank");
      bit_check(hsync, hp >= C + HSF - 1 && hp <= C + HSL - 1, "hsync");
      bit_check(vblank, !(vp >= 0 && vp < R), "vblank");
      bit_check(vsync, vp >= R + VSF - 1 && vp <= R + VSL - 1, "vsync");
      bit_check(odd_row, vp >= 0 && vp < R && (vp % 2) == 0, "odd_row");
      checks += 2;
      if (row_sel_hex !== row_sel) begin failures++; $display("FAIL hex row"); end
      for (int r = 0; r < R; r++) if (row_bias[r] != (exp_row[r] ? 800000 : 0)) begin failures++; $display("FAIL row bias %0d", r); break; end
      cur_row = (vp >= 0 && vp < R) ? vp : -1;
      es = sense_of((cur_row >= 0 && hp >= 0 && hp < C) ? longint'(pixel(cur_row, hp)) : 0);
      checks += 2;
      if (fabs(real'(sense) - es) > 3000.0) begin failures++; $display("FAIL sense %0d exp %0f", sense, es); end
      if (hblank || vblank) begin
        if (video != 0) begin failures++; $display("FAIL video not blanked"); end
      end else if (fabs(real'(video) - video_of(es)) > 6000.0) begin
        failures++; $display("FAIL video %0d exp %0f", video, video_of(es));
      end
      // second channel
      checks += 3;
      if (sense2[0] !== sense || video2[0] !== video) begin failures++; $display("FAIL channel 0 of two-channel copy"); end
      es = sense_of((cur_row >= 0 && hp >= 0 && hp < C) ? longint'(pixel2(cur_row, hp)) : 0);
      if (fabs(real'(sense2[1]) - es) > 3000.0) begin failures++; $display("FAIL channel 1 sense %0d exp %0f", sense2[1], es); end
      if (hblank || vblank) begin
        if (video2[1] != 0) begin failures++; $display("FAIL channel 1 not blanked"); end
      end else begin
        ch2_seen++;
        if (fabs(real'(video2[1]) - video_of(es)) > 6000.0) begin failures++; $display("FAIL channel 1 video %0d", video2[1]); end
      end
      // interval lengths
      line_clocks++;
      if (hsync && !hsync_q) begin
        hsyncs++;
        if (hsyncs > 1) begin checks++; if (line_clocks != HN + 1) begin failures++; $display("FAIL line %0d clocks", line_clocks); end end
        line_clocks = 0;
        frame_lines++;
      end
      if (vsync && !vsync_q) begin
        vsyncs++;
        if (vsyncs > 1) begin
          checks++; frames++;
          if (frame_lines != (VN + 1) * 2 * J) begin failures++; $display("FAIL frame %0d lines", frame_lines); end
        end
        frame_lines = 0;
      end
      hsync_q = hsync; vsync_q = vsync;
    end
    // stopping the scan freezes every output
    scan_en = 0;
    @(negedge clk); #1;
    held = col_sel;
    repeat (3 * (HN + 1)) begin
      @(negedge clk); #1;
      checks++; freezes++;
      if (col_sel !== held || hsync !== hsync_q) begin failures++; $display("FAIL scan did not stop"); end
    end
    checks++;
    if (hsyncs < 10 || frames < 2 || row_changes < R || hex_odd == 0 || hex_even == 0 || freezes == 0 || ch2_seen == 0) begin
      failures++; $display("FAIL mechanisms");
    end
    $display("mechanisms: hsync=%0d vsync=%0d frames=%0d row_changes=%0d hex_odd=%0d hex_even=%0d freeze_clocks=%0d second_channel_pixels=%0d",
             hsyncs, vsyncs, frames, row_changes, hex_odd, hex_even, freezes, ch2_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
