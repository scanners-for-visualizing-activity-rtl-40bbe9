// current_sense_amp: behavioural model of the scanner's current-sense amplifier.
//
// A feedback amplifier holds the scan-out wire at Vref, so the wire never has
// to charge to a signal voltage, and the current through the feedback element
// equals the pixel current. Three transfer laws are modelled (MODE):
//   SENSE_LINEAR  resistor R (off-chip opamp, bidirectional):
//                 Vout = Vref + I*R
//   SENSE_LOG     on-chip transistor below threshold (unidirectional):
//                 Vout = (Vref + UT*ln(I/I0)) / kappa
//   SENSE_SQRT    the same transistor above threshold:
//                 Vout = (Vref + VT + sqrt(I/I0')) / kappa
// Units: current in pA, voltages in uV, R in ohm, I0 in fA, I0' in pA/V^2,
// kappa in 1/1000. The square root is an exact integer square root (to 1 uV)
// and reads negative currents as zero.
// The logarithm is a base-2 logarithm made of the position of the leading one
// plus linear interpolation of the remaining bits (Q16), times ln 2. In log
// mode currents below I0 (including zero and negative ones) give ln = 0.
// The model is static: the settling time tau_in/(kappa*A) and the ringing of a
// slow feedback amplifier are not represented. Defaults for R, I0 and Vref are
// this model's choices; kappa = 0.7 is the usual back-gate coefficient.
// Combinational.
module current_sense_amp
  import scanner_pkg::*;
#(
  parameter sense_mode_e MODE         = SENSE_LOG,
  parameter int unsigned R_OHM        = 1000000,
  parameter int          VREF_UV      = 1000000,
  parameter int unsigned I0_FA        = 1,
  parameter int unsigned KAPPA_PERMIL = 700,
  parameter int          VT_UV        = 800000,
  parameter int unsigned I0P_PA_PER_V2 = 10000000
) (
  input  current_pa_t i_pa,
  output voltage_uv_t v_out_uv
);

  // Base-2 logarithm of x >= 1 in unsigned Q16.
  function automatic logic [31:0] log2_q16(input logic [63:0] x);
    int unsigned p = 0;
    logic [63:0] rem;
    logic [31:0] frac;
    for (int unsigned b = 0; b < 64; b++) if (x[b]) p = b;
    rem  = x - (64'd1 << p);
    frac = (p >= 16) ? 32'(rem >> (p - 16)) : 32'(rem << (16 - p));
    return (32'(p) << 16) + frac;
  endfunction

  // Integer square root (floor) of a 96-bit value, bit by bit.
  function automatic logic [47:0] isqrt96(input logic [95:0] x);
    logic [47:0] r = '0;
    logic [47:0] t;
    for (int b = 47; b >= 0; b--) begin
      t = r | (48'd1 << b);
      if (96'(t) * 96'(t) <= x) r = t;
    end
    return r;
  endfunction

  localparam longint R_L     = longint'(R_OHM);
  localparam longint VREF_L  = longint'(VREF_UV);
  localparam longint I0_L    = longint'(I0_FA);
  localparam longint KAPPA_L = longint'(KAPPA_PERMIL);

  longint      i_l, lin_uv, log_uv, sqrt_uv;
  logic [95:0] sq_arg;    // (I/I0') in uV^2
  logic [63:0] ratio;
  logic [63:0] ln_uv;     // UT * ln(I/I0), uV

  always_comb begin
    // pA * ohm = 1e-12 V = 1e-6 uV
    i_l    = longint'(i_pa);
    lin_uv = VREF_L + (i_l * R_L) / 64'sd1000000;

    ratio  = (i_l > 0) ? 64'((i_l * 64'sd1000) / I0_L) : 64'd0;
    if (ratio == 0) ratio = 64'd1;
    ln_uv  = (64'(UT_UV) * 64'(log2_q16(ratio)) * 64'(LN2_Q16)) >> 32;
    log_uv = ((VREF_L + longint'(ln_uv)) * 64'sd1000) / KAPPA_L;

    // sqrt(I/I0') in V = sqrt(I_pA * 1e12 / I0'_pA/V^2) in uV
    sq_arg  = (i_l > 0) ? (96'(i_l) * 96'd1000000000000) / 96'(I0P_PA_PER_V2) : 96'd0;
    sqrt_uv = ((VREF_L + longint'(VT_UV) + longint'(isqrt96(sq_arg))) * 64'sd1000) / KAPPA_L;

    case (MODE)
      SENSE_LINEAR: v_out_uv = voltage_uv_t'(lin_uv);
      SENSE_SQRT:   v_out_uv = voltage_uv_t'(sqrt_uv);
      default:      v_out_uv = voltage_uv_t'(log_uv);
    endcase
  end

endmodule
