// tb_workload_50x50: the video scanner sized for a 50 x 50 pixel array with
// the published blank sections (horizontal 11 stages, sync on stages 2-4;
// vertical 10 stages, sync on stages 2-3) and each row shown on six lines.
// Two frames are scanned; the testbench measures the line length, the lines
// per frame and the displayed lines, checks them against the stage counts
// (50+11+1 clocks per line, (50+10+1)*6 lines per frame, 300 displayed) and
// reports the clock frequency range over which the frame rate stays inside the
// 60 +- 15 Hz monitor window together with the two blank ratios.
module tb_workload_50x50;
  import scanner_pkg::*;
  localparam int C = 50, R = 50;
  logic clk = 0, rst = 1;
  current_pa_t [C-1:0] col_i;
  logic [R-1:0] row_sel, row_sel_n;
  voltage_uv_t [R-1:0] row_bias;
  logic [C-1:0] col_sel;
  logic odd_row, hsync, hblank, vsync, vblank;
  voltage_uv_t sense, video;
  int checks = 0, failures = 0;

  video_scanner #(.COLS(C), .ROWS(R)) dut (
    .clk(clk), .rst(rst), .scan_en(1'b1), .col_current_pa(col_i),
    .row_sel(row_sel), .row_sel_n(row_sel_n), .row_bias_uv(row_bias), .col_sel(col_sel), .odd_row(odd_row),
    .hsync(hsync), .hblank(hblank), .vsync(vsync), .vblank(vblank), .sense_uv(sense), .video_uv(video));

  always #5 clk = ~clk;

  always_comb for (int c = 0; c < C; c++) col_i[c] = current_pa_t'(1000 + 100 * c);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int frames = 0, clocks = 0, lines = 0, disp_lines = 0, line_clocks = 0, line_len = 0;
    logic hs_q = 1, vs_q = 1;
    real fmin, fmax;
    repeat (2) @(negedge clk);
    rst = 0;
    @(posedge vsync);
    while (frames < 2) begin
      @(negedge clk); #1;
      clocks++; line_clocks++;
      if (hsync && !hs_q) begin
        lines++;
        if (!vblank) disp_lines++;
        line_len = line_clocks; line_clocks = 0;
      end
      if (vsync && !vs_q) begin
        frames++;
        fmin = 45.0 * clocks / 1.0e6;
        fmax = 75.0 * clocks / 1.0e6;
        $display("50x50: line %0d clocks, %0d lines per frame (%0d displayed), %0d clocks per frame",
                 line_len, lines, disp_lines, clocks);
        $display("  60 +- 15 Hz needs a clock of %0.2f .. %0.2f MHz (60 Hz at %0.2f MHz)", fmin, fmax, 60.0 * clocks / 1.0e6);
        $display("  horizontal blank %0.1f %% of display (limit 26..40), vertical blank %0.1f %% (limit 10..30)",
                 100.0 * (line_len - C) / C, 100.0 * (lines - disp_lines) / disp_lines);
        checks += 4;
        if (line_len != C + 11 + 1) begin failures++; $display("FAIL line length"); end
        if (lines != (R + 10 + 1) * 6) begin failures++; $display("FAIL lines per frame"); end
        if (disp_lines != R * 6) begin failures++; $display("FAIL displayed lines"); end
        if (lines < 200 || lines > 700) begin failures++; $display("FAIL monitor line count"); end
        clocks = 0; lines = 0; disp_lines = 0;
      end
      hs_q = hsync; vs_q = vsync;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
