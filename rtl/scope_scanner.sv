// scope_scanner: one-dimensional scanner that shows a row of analog pixels on
// an oscilloscope.
//
// A scan_register walks one selected bit along the N pixels, one pixel per
// clock. The selected pixel's current is switched onto the scan-out wire and
// all others onto the reference wire (scan_switch_array); a linear
// current-sense amplifier holds the scan-out wire at Vref and outputs
// Vref + I*R. The register's wired-NAND line drops for one clock between scans
// and is the oscilloscope trigger (`sync`, high for that clock). A scan takes
// N+1 clocks. `en` low freezes the scan on the current pixel. The register is
// self-initializing; `rst` is optional. N is this design's default, the
// structure follows the published one-dimensional scanner.
module scope_scanner
  import scanner_pkg::*;
#(
  parameter int unsigned N = 50
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  current_pa_t [N-1:0] pix_pa,
  output logic        [N-1:0] sel,
  output logic                sync,
  output current_pa_t         i_ref_pa,
  output voltage_uv_t         v_out_uv
);

  logic [N-1:0] sel_first_unused;
  current_pa_t  i_scan_pa;

  scan_register #(.N(N)) u_reg (
    .clk(clk), .rst(rst), .en(en),
    .sel(sel), .sel_first(sel_first_unused), .empty(sync)
  );

  scan_switch_array #(.N(N)) u_switch (
    .sel(sel), .i_in_pa(pix_pa), .i_scan_pa(i_scan_pa), .i_ref_pa(i_ref_pa)
  );

  current_sense_amp #(.MODE(SENSE_LINEAR)) u_sense (
    .i_pa(i_scan_pa), .v_out_uv(v_out_uv)
  );

endmodule
