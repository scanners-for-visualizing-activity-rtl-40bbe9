// axis_scanner: horizontal or vertical scanner of a video scanner, with sync
// and blank generated by the shift register itself.
//
// The scan register is extended past the DISPLAY stages that select columns
// (or rows) by a BLANK section. Three more wired-NAND lines read it:
//   display line  stages 0..DISPLAY-1; blank = NOT display, so blank covers
//                 the blank section and the empty clock between scans
//   sync line     stages SYNC_FIRST..SYNC_LAST of the blank section (counted
//                 from 1), so sync sits near the start of blank
//   odd line      display stages 1, 3, 5, ... (0-based 0, 2, 4, ...); used on
//                 the vertical scanner of a hexagonal array
// One scan takes DISPLAY+BLANK+1 clocks (or enabled steps). The stage count,
// line placement and sync position follow the scanner's published layout; the
// active-high output polarity is a choice of this design. All outputs change
// just after the falling clock edge except sel_first (rising edge).
module axis_scanner #(
  parameter int unsigned DISPLAY    = 43,
  parameter int unsigned BLANK      = 11,
  parameter int unsigned SYNC_FIRST = 2,
  parameter int unsigned SYNC_LAST  = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  output logic [DISPLAY-1:0] sel,
  output logic [DISPLAY-1:0] sel_first,
  output logic               sync,
  output logic               blank,
  output logic               odd
);

  localparam int unsigned N = DISPLAY + BLANK;

  logic [N-1:0] stages, stages_first;
  logic display, empty;

  initial begin
    assert (SYNC_FIRST >= 1 && SYNC_FIRST <= SYNC_LAST && SYNC_LAST <= BLANK)
      else $fatal(1, "axis_scanner: sync stages must lie in the blank section");
  end

  scan_register #(.N(N)) u_reg (
    .clk(clk), .rst(rst), .en(en),
    .sel(stages), .sel_first(stages_first), .empty(empty)
  );

  wired_nand_line #(.N(N), .FIRST(0), .LAST(DISPLAY-1), .STRIDE(1)) u_display (
    .stage_bits(stages), .line(display)
  );

  wired_nand_line #(.N(N), .FIRST(DISPLAY+SYNC_FIRST-1), .LAST(DISPLAY+SYNC_LAST-1), .STRIDE(1)) u_sync (
    .stage_bits(stages), .line(sync)
  );

  wired_nand_line #(.N(N), .FIRST(0), .LAST(DISPLAY-1), .STRIDE(2)) u_odd (
    .stage_bits(stages), .line(odd)
  );

  assign blank     = ~display;
  assign sel       = stages[DISPLAY-1:0];
  assign sel_first = stages_first[DISPLAY-1:0];

  // The empty clock lies outside the display interval.
  a_empty_blank: assert property (@(negedge clk) empty |-> blank);

endmodule
