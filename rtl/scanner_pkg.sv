// scanner_pkg: types and constants shared by the scanner modules.
//
// The scanners steer analog pixel currents and produce analog voltages. The
// behavioural models of those analog parts carry their quantities as signed
// 32-bit integers in fixed units, so that every tool that reads the design can
// elaborate them: currents in picoamperes, voltages in microvolts.
package scanner_pkg;

  // Current in pA and voltage in uV, signed.
  typedef logic signed [31:0] current_pa_t;
  typedef logic signed [31:0] voltage_uv_t;

  // Transfer law of a current-sense amplifier.
  //   SENSE_LINEAR: opamp with a feedback resistor, Vout = Vref + I*R
  //   SENSE_LOG:    subthreshold feedback transistor, Vout = (Vref + UT*ln(I/I0))/kappa
  //   SENSE_SQRT:   feedback transistor above threshold,
  //                 Vout = (Vref + VT + sqrt(I/I0'))/kappa
  typedef enum logic [1:0] {
    SENSE_LINEAR = 2'd0,
    SENSE_LOG    = 2'd1,
    SENSE_SQRT   = 2'd2
  } sense_mode_e;

  // Thermal voltage kT/q at 300 K, in uV.
  localparam int unsigned UT_UV = 25852;

  // ln(2) in unsigned Q16.
  localparam int unsigned LN2_Q16 = 45426;

endpackage
