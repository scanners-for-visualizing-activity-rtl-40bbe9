// video_scanner: two-dimensional scanner that turns an array of analog pixels
// into a picture on a multiscanning monitor.
//
// Horizontal: an axis_scanner with COLS display stages and an H_BLANK-stage
// blank section selects one column per clock and produces hsync and hblank.
// A line therefore lasts COLS+H_BLANK+1 clocks.
// Row counting: a johnson_counter of JC_STAGES stages advances at the start of
// every hsync pulse; when its last stage rises the vertical axis_scanner
// (ROWS display stages, V_BLANK blank stages) advances, so each pixel row is
// shown on 2*JC_STAGES video lines, and rows change during horizontal blank.
// A frame lasts (ROWS+V_BLANK+1)*2*JC_STAGES lines; vsync and vblank come from
// the vertical scanner.
// Output path: the selected row's column currents (col_current_pa, supplied by
// the pixel array in response to row_sel) go through the column switches to a
// logarithmic current-sense amplifier and the video driver, which blanks.
// A chip that scans out several signals per pixel has CHANNELS such paths,
// one colour each (col_current_pa[ch], sense_uv[ch], video_uv[ch]); with one
// channel the same video level would feed all three colour inputs.
// Row select: row_sel (high = selected) and its complement row_sel_n (low =
// selected), both available from the vertical stages, suit pixels whose
// select switch closes on a high or on a low line; row_bias_uv gives the
// selected row its amplifier bias when the pixels use transconductance
// amplifiers.
// Hexagonal arrays (HEX_ARRAY=1): the vertical scanner's odd-row line makes
// odd rows use the first half-phase of the horizontal stages, half a clock
// earlier than even rows.
// Sizes default to the published example retina chip (43 columns, 68 rows,
// each row shown six times) with the blank sections the published layout
// gives for a 50x50 chip. The strobe-based row clocking, active-high sync and
// blank outputs and the reset are this design's choices. Outputs from the
// scanners change just after the falling clock edge.
module video_scanner
  import scanner_pkg::*;
#(
  parameter int unsigned COLS         = 43,
  parameter int unsigned ROWS         = 68,
  parameter int unsigned JC_STAGES    = 3,
  parameter int unsigned H_BLANK      = 11,
  parameter int unsigned H_SYNC_FIRST = 2,
  parameter int unsigned H_SYNC_LAST  = 4,
  parameter int unsigned V_BLANK      = 10,
  parameter int unsigned V_SYNC_FIRST = 2,
  parameter int unsigned V_SYNC_LAST  = 3,
  parameter bit          HEX_ARRAY    = 1'b0,
  parameter int unsigned CHANNELS     = 1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   scan_en,
  input  current_pa_t [CHANNELS-1:0][COLS-1:0] col_current_pa,
  output logic        [ROWS-1:0] row_sel,
  output logic        [ROWS-1:0] row_sel_n,
  output voltage_uv_t [ROWS-1:0] row_bias_uv,
  output logic        [COLS-1:0] col_sel,
  output logic                   odd_row,
  output logic                   hsync,
  output logic                   hblank,
  output logic                   vsync,
  output logic                   vblank,
  output voltage_uv_t [CHANNELS-1:0] sense_uv,
  output voltage_uv_t [CHANNELS-1:0] video_uv
);

  logic [COLS-1:0]      h_sel, h_sel_first, hex_sel;
  logic [ROWS-1:0]      v_sel_first_unused;
  logic                 h_odd_unused;
  logic                 hsync_q, hstep, vstep;
  logic [JC_STAGES-1:0] jc_state;

  axis_scanner #(
    .DISPLAY(COLS), .BLANK(H_BLANK), .SYNC_FIRST(H_SYNC_FIRST), .SYNC_LAST(H_SYNC_LAST)
  ) u_hscan (
    .clk(clk), .rst(rst), .en(scan_en),
    .sel(h_sel), .sel_first(h_sel_first), .sync(hsync), .blank(hblank), .odd(h_odd_unused)
  );

  // Start of each horizontal sync pulse.
  always_ff @(posedge clk) begin
    if (rst) hsync_q <= 1'b0;
    else     hsync_q <= hsync;
  end
  assign hstep = hsync & ~hsync_q;

  johnson_counter #(.N(JC_STAGES)) u_jc (
    .clk(clk), .rst(rst), .step(hstep), .state(jc_state), .vclk_rise(vstep)
  );

  axis_scanner #(
    .DISPLAY(ROWS), .BLANK(V_BLANK), .SYNC_FIRST(V_SYNC_FIRST), .SYNC_LAST(V_SYNC_LAST)
  ) u_vscan (
    .clk(clk), .rst(rst), .en(vstep),
    .sel(row_sel), .sel_first(v_sel_first_unused), .sync(vsync), .blank(vblank), .odd(odd_row)
  );

  assign row_sel_n = ~row_sel;

  hex_phase_select #(.N(COLS)) u_hex (
    .first(h_sel_first), .second(h_sel), .odd_row(odd_row), .sel(hex_sel)
  );

  assign col_sel = HEX_ARRAY ? hex_sel : h_sel;

  // One output chain per scanned signal (colour channel), all sharing the
  // column selects and the blank signals.
  for (genvar ch = 0; ch < CHANNELS; ch++) begin : g_channel
    current_pa_t i_scan_pa, i_ref_unused;

    scan_switch_array #(.N(COLS)) u_colsw (
      .sel(col_sel), .i_in_pa(col_current_pa[ch]), .i_scan_pa(i_scan_pa), .i_ref_pa(i_ref_unused)
    );

    current_sense_amp #(.MODE(SENSE_LOG)) u_sense (
      .i_pa(i_scan_pa), .v_out_uv(sense_uv[ch])
    );

    video_driver u_video (
      .v_sense_uv(sense_uv[ch]), .hblank(hblank), .vblank(vblank), .video_uv(video_uv[ch])
    );
  end

  row_bias_driver #(.N(ROWS)) u_rowbias (
    .row_sel(row_sel), .row_bias_uv(row_bias_uv)
  );

endmodule
