// scan_register: self-initializing token shift register of a scanner.
//
// N csrl_stage stages in a chain. One stage normally holds the selected bit,
// which advances one stage per clock; its position selects the pixel (or
// column, or row) that is connected to the output. A wired-NAND line over all
// stage outputs tells whether any stage holds the bit. While one does, empty
// bits are loaded into the first stage; when the bit has left the last stage
// the line drops and a new bit is loaded, so a scan of N stages takes N+1
// clocks, the extra clock having no stage selected. The same line is the scan
// sync (`empty` is high for that one clock). If several bits are present at
// power-up, no new bit enters until all have left, after which the register
// runs with exactly one bit: no reset or external control is needed.
//
// Timing: sel (stage outputs) changes just after the falling clock edge,
// sel_first (first half-phase) just after the rising edge. en low freezes the
// scan. rst is an optional synchronous clear of all stages.
module scan_register #(
  parameter int unsigned N = 50
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [N-1:0] sel,        // stage outputs, bit i = stage i selected
  output logic [N-1:0] sel_first,  // first half-phase of each stage
  output logic         empty       // no stage holds the bit (sync)
);

  logic any_bit;
  logic [N-1:0] d;

  wired_nand_line #(.N(N), .FIRST(0), .LAST(N-1), .STRIDE(1)) u_newbit (
    .stage_bits(sel), .line(any_bit)
  );

  assign empty = ~any_bit;

  always_comb begin
    d[0] = ~any_bit;
    for (int unsigned i = 1; i < N; i++) d[i] = sel[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    csrl_stage u_stage (
      .clk(clk), .rst(rst), .en(en), .d(d[i]),
      .q_first(sel_first[i]), .q(sel[i])
    );
  end

endmodule
