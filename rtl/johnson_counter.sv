// johnson_counter: N-stage Johnson (twisted-ring) line counter.
//
// Each step shifts the stages by one, the first stage taking the inverted last
// stage, so from all zeros the counter walks 2N states (for N = 3: 000, 100,
// 110, 111, 011, 001, written first stage first) and its last stage is a
// square wave of period 2N steps. In the video scanner a step is one
// horizontal sync pulse and the rising of the last stage advances the vertical
// scanner, so every pixel row fills 2N video lines. The circuit clocks the
// counter directly with horizontal sync and the vertical scanner with the last
// stage; here both are one-clock strobes in the main clock domain
// (`step` in, `vclk_rise` out, combinational from state and step). For N > 2
// the ring has unused (parasitic) states, so the counter has a synchronous
// reset to all zeros.
module johnson_counter #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         step,
  output logic [N-1:0] state,      // state[0] is the first stage
  output logic         vclk_rise   // the last stage rises on this step
);

  logic [N-1:0] next;

  always_comb begin
    next[0] = ~state[N-1];
    for (int unsigned i = 1; i < N; i++) next[i] = state[i-1];
  end

  assign vclk_rise = step & ~state[N-1] & next[N-1];

  always_ff @(posedge clk) begin
    if (rst)       state <= '0;
    else if (step) state <= next;
  end

endmodule
