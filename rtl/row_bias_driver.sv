// row_bias_driver: behavioural model of the vertical scanner's row bias output.
//
// When the pixels turn their differential voltage into a current with a
// transconductance amplifier, the selected row needs that amplifier's bias
// voltage. Each row has a complementary pass gate driven by the vertical
// shift-register stage: the selected row receives Vb, every other row is held
// at ground so its amplifiers draw no current. Vb (uV) is a parameter here;
// holding unselected rows at ground is this model's reading of the circuit.
// Combinational.
module row_bias_driver
  import scanner_pkg::*;
#(
  parameter int unsigned N     = 68,
  parameter int          VB_UV = 800000
) (
  input  logic        [N-1:0] row_sel,
  output voltage_uv_t [N-1:0] row_bias_uv
);

  always_comb begin
    for (int unsigned r = 0; r < N; r++)
      row_bias_uv[r] = row_sel[r] ? voltage_uv_t'(VB_UV) : voltage_uv_t'(0);
  end

endmodule
