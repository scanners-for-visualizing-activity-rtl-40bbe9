// wired_nand_line: one wired-NAND line of the scanner with its pulldown.
//
// In the circuit every connected shift-register stage has a transistor on a
// shared line; a stage holding the (low) selected bit pulls the line high, and
// a weakly biased pulldown pulls it low when no connected stage holds the bit.
// Logically the line is the OR of "this stage holds the bit" over the connected
// stages. The connected stages are FIRST..LAST (0-based, inclusive) taking every
// STRIDE-th one, which covers the new-bit line (all stages), the display and
// sync lines of a video scanner (a range) and the odd-row line used for
// hexagonal arrays (stride 2). Purely combinational.
module wired_nand_line #(
  parameter int unsigned N      = 8,
  parameter int unsigned FIRST  = 0,
  parameter int unsigned LAST   = 7,
  parameter int unsigned STRIDE = 1
) (
  input  logic [N-1:0] stage_bits,   // 1 = stage holds the selected bit
  output logic         line          // 1 = line pulled high by some connected stage
);

  function automatic logic [N-1:0] connect_mask();
    logic [N-1:0] m = '0;
    for (int unsigned i = FIRST; i <= LAST && i < N; i += STRIDE) m[i] = 1'b1;
    return m;
  endfunction

  localparam logic [N-1:0] MASK = connect_mask();

  initial begin
    assert (FIRST <= LAST && LAST < N && STRIDE > 0)
      else $fatal(1, "wired_nand_line: bad stage range");
  end

  assign line = |(stage_bits & MASK);

endmodule
