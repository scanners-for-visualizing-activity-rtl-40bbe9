// video_driver: behavioural model of the video output chain of one colour.
//
// The sense-amplifier output goes through an on-chip voltage follower to a
// large output transistor; off-chip, the transistor's drain resistor and an
// inverting amplifier or emitter follower drive the monitor's 75-ohm input,
// and on-chip blanking transistors pull the signal down while horizontal or
// vertical blank is active. The model reduces the four published driver
// variants to one linear stage:
//   video = V_BLANK_UV                                      during hblank|vblank
//   video = clamp(V_BLACK_UV + s*GAIN*(v_sense - V_SENSE_REF), V_BLACK_UV, V_FULL_UV)
// with s = -1 when INVERT is set. The range of about one volt from black to
// full brightness follows the monitor interface; gain, reference and levels
// are this model's defaults, the knobs that potentiometers set off-chip.
// Units uV, GAIN in 1/1000. Combinational.
module video_driver
  import scanner_pkg::*;
#(
  parameter bit INVERT         = 1'b0,
  parameter int GAIN_PERMIL    = 2000,
  parameter int V_SENSE_REF_UV = 1800000,
  parameter int V_BLANK_UV     = 0,
  parameter int V_BLACK_UV     = 50000,
  parameter int V_FULL_UV      = 1000000
) (
  input  voltage_uv_t v_sense_uv,
  input  logic        hblank,
  input  logic        vblank,
  output voltage_uv_t video_uv
);

  logic signed [63:0] diff, level;

  always_comb begin
    diff  = 64'(v_sense_uv) - 64'(V_SENSE_REF_UV);
    if (INVERT) diff = -diff;
    level = 64'(V_BLACK_UV) + (diff * 64'(GAIN_PERMIL)) / 64'sd1000;
    if (level < 64'(V_BLACK_UV)) level = 64'(V_BLACK_UV);
    if (level > 64'(V_FULL_UV))  level = 64'(V_FULL_UV);
    video_uv = (hblank || vblank) ? voltage_uv_t'(V_BLANK_UV) : voltage_uv_t'(level);
  end

endmodule
