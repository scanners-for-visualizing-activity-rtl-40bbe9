// scan_switch_array: behavioural model of the scanner's output multiplexer.
//
// Each pixel (or column) output has a complementary pair of pass-transistor
// switches. When its select bit is set the pixel current flows into the
// scan-out wire, otherwise into the reference wire; both wires sit at the same
// virtual ground, so the pixel sees the same potential either way. The model
// steers ideal currents (pA): i_scan_pa is the sum over selected inputs,
// i_ref_pa the sum over the rest. Charge injection when a switch opens is not
// modelled. Combinational.
module scan_switch_array
  import scanner_pkg::*;
#(
  parameter int unsigned N = 43
) (
  input  logic        [N-1:0] sel,
  input  current_pa_t [N-1:0] i_in_pa,
  output current_pa_t         i_scan_pa,
  output current_pa_t         i_ref_pa
);

  always_comb begin
    i_scan_pa = '0;
    i_ref_pa  = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (sel[i]) i_scan_pa += i_in_pa[i];
      else        i_ref_pa  += i_in_pa[i];
    end
  end

endmodule
