// crystal_oscillator: behavioural model (not synthesizable) of the on-chip
// crystal oscillator that makes the video scanner's main clock.
//
// In the circuit three on-chip inverters drive an off-chip crystal, biased into
// their high-gain region by an off-chip resistor, with an RC network adding
// the phase shift that closes the loop at the crystal's resonance; the last
// inverter is large and drives the clock fanout. The model is a free-running
// square wave of period PERIOD_PS (default 1.8 MHz) from time zero;
// xtal_out (the drive to the crystal) is the clock itself and xtal_in is
// read only to mark the pin. Start-up, amplitude and overtone behaviour are not
// modelled.
module crystal_oscillator #(
  parameter int unsigned PERIOD_PS = 555556
) (
  input  logic xtal_in,
  output logic xtal_out,
  output logic clk
);

  logic osc;
  logic unused_pin;

  initial osc = 1'b0;
  always #(1ps * (PERIOD_PS / 2)) osc = ~osc;

  assign clk        = osc;
  assign xtal_out   = osc;
  assign unused_pin = xtal_in;

endmodule
