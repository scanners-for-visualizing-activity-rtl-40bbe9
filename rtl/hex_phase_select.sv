// hex_phase_select: half-phase selection for scanning a hexagonal array.
//
// In a hexagonal layout alternate rows are offset by half a pixel, so on
// screen alternate rows must be delayed by half a clock. Every horizontal
// stage offers two versions of its bit: the first half-phase, which changes at
// the rising clock edge, and the stage output, half a clock later. A per-column
// switch takes the first half-phase while the odd-row line of the vertical
// scanner is high (odd rows) and the stage output otherwise (even rows); the
// result drives the column multiplexer. Purely combinational.
module hex_phase_select #(
  parameter int unsigned N = 43
) (
  input  logic [N-1:0] first,    // first half-phase per column
  input  logic [N-1:0] second,   // stage output per column
  input  logic         odd_row,
  output logic [N-1:0] sel
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) sel[i] = odd_row ? first[i] : second[i];
  end

endmodule
