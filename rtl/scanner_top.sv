// scanner_top: the two scanner designs side by side.
//
// Video scanner: the on-chip crystal oscillator (behavioural) clocks a
// video_scanner of COLS x ROWS pixels; the pixel array itself is outside and
// answers row_sel (or its complement row_sel_n) with the column currents of the selected row on
// col_current_pa. The scanner brings out row selects and row bias, the column
// control, the sync pins hsync_n/vsync_n (active low, through the sync output
// inverters, since monitors trigger on the falling sync edge), the blank
// signals hblank/vblank (active high, as they switch on the pull-down blanking
// transistors), the sense-amplifier voltage and the video level; the
// oscillator clock is brought out as clk_out.
// Oscilloscope scanner: a scope_scanner of SCOPE_PIXELS pixels with its own
// single-phase clock input, pixel currents, sync trigger and sense output.
// rst clears both scanners' registers and the line counter; both run
// correctly without it apart from the Johnson counter's parasitic states.
module scanner_top
  import scanner_pkg::*;
#(
  parameter int unsigned COLS          = 43,
  parameter int unsigned ROWS          = 68,
  parameter int unsigned JC_STAGES     = 3,
  parameter int unsigned H_BLANK       = 11,
  parameter int unsigned V_BLANK       = 10,
  parameter bit          HEX_ARRAY     = 1'b0,
  parameter int unsigned CHANNELS      = 1,
  parameter int unsigned SCOPE_PIXELS  = 50,
  parameter int unsigned CLK_PERIOD_PS = 555556
) (
  // video scanner
  input  logic                           xtal_in,
  output logic                           xtal_out,
  output logic                           clk_out,
  input  logic                           rst,
  input  logic                           scan_en,
  input  current_pa_t [CHANNELS-1:0][COLS-1:0] col_current_pa,
  output logic        [ROWS-1:0]         row_sel,
  output logic        [ROWS-1:0]         row_sel_n,
  output voltage_uv_t [ROWS-1:0]         row_bias_uv,
  output logic        [COLS-1:0]         col_sel,
  output logic                           hsync_n,
  output logic                           hblank,
  output logic                           vsync_n,
  output logic                           vblank,
  output voltage_uv_t [CHANNELS-1:0]     sense_uv,
  output voltage_uv_t [CHANNELS-1:0]     video_uv,
  // oscilloscope scanner
  input  logic                           scope_clk,
  input  logic                           scope_en,
  input  current_pa_t [SCOPE_PIXELS-1:0] scope_pix_pa,
  output logic        [SCOPE_PIXELS-1:0] scope_sel,
  output logic                           scope_sync,
  output voltage_uv_t                    scope_vout_uv
);

  logic        clk;
  logic        hsync, vsync;
  logic        odd_row_unused;
  current_pa_t scope_iref_unused;

  crystal_oscillator #(.PERIOD_PS(CLK_PERIOD_PS)) u_osc (
    .xtal_in(xtal_in), .xtal_out(xtal_out), .clk(clk)
  );

  assign clk_out = clk;

  // sync output inverters
  assign hsync_n = ~hsync;
  assign vsync_n = ~vsync;

  video_scanner #(
    .COLS(COLS), .ROWS(ROWS), .JC_STAGES(JC_STAGES),
    .H_BLANK(H_BLANK), .V_BLANK(V_BLANK), .HEX_ARRAY(HEX_ARRAY), .CHANNELS(CHANNELS)
  ) u_video (
    .clk(clk), .rst(rst), .scan_en(scan_en), .col_current_pa(col_current_pa),
    .row_sel(row_sel), .row_sel_n(row_sel_n), .row_bias_uv(row_bias_uv), .col_sel(col_sel), .odd_row(odd_row_unused),
    .hsync(hsync), .hblank(hblank), .vsync(vsync), .vblank(vblank),
    .sense_uv(sense_uv), .video_uv(video_uv)
  );

  scope_scanner #(.N(SCOPE_PIXELS)) u_scope (
    .clk(scope_clk), .rst(rst), .en(scope_en), .pix_pa(scope_pix_pa),
    .sel(scope_sel), .sync(scope_sync), .i_ref_pa(scope_iref_unused), .v_out_uv(scope_vout_uv)
  );

endmodule
