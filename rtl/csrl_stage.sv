// csrl_stage: one stage of the single-phase static scanner shift register.
//
// The circuit stage is two pairs of cross-coupled inverters. The first pair is
// loaded from the previous stage while the clock is high and holds while it is
// low; the second pair is loaded from the first while the clock is low and
// holds (fully restored) while it is high. Here the first pair is a flop on the
// rising clock edge and the second pair a flop on the falling edge, which gives
// the same movement of one bit per clock and keeps both halves visible:
//   q_first  first half-phase, changes just after the rising edge
//   q        stage output (V_n in the circuit), changes just after the falling
//            edge, half a clock later
// The stored bit is active high (1 = this stage holds the selected bit); in the
// circuit the selected bit is a low V_n. `en` low stops the stage, which is how
// the scan is frozen on one pixel (the circuit stops its clock). `rst` clears
// the stage synchronously; the circuit has no reset and relies on the
// self-initializing new-bit logic around it, which still works without rst.
module csrl_stage (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic d,
  output logic q_first,
  output logic q
);

  always_ff @(posedge clk) begin
    if (rst)     q_first <= 1'b0;
    else if (en) q_first <= d;
  end

  always_ff @(negedge clk) q <= q_first;

endmodule
