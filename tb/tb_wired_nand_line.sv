// tb_wired_nand_line: random stage patterns on three wired-NAND lines (all
// stages, a range, every second stage of a range); the expected level is the
// OR over the connected stages, computed here from the stage numbers.
module tb_wired_nand_line;
  localparam int N = 12;
  logic [N-1:0] bits;
  logic line_all, line_rng, line_odd;
  int checks = 0, failures = 0;

  wired_nand_line #(.N(N), .FIRST(0), .LAST(N-1), .STRIDE(1)) u_all (.stage_bits(bits), .line(line_all));
  wired_nand_line #(.N(N), .FIRST(3), .LAST(7),   .STRIDE(1)) u_rng (.stage_bits(bits), .line(line_rng));
  wired_nand_line #(.N(N), .FIRST(1), .LAST(9),   .STRIDE(2)) u_odd (.stage_bits(bits), .line(line_odd));

  function automatic logic connected(int i, int first, int last, int stride);
    return i >= first && i <= last && ((i - first) % stride) == 0;
  endfunction

  task automatic apply(input logic [N-1:0] v);
    logic e_all = 0, e_rng = 0, e_odd = 0;
    bits = v;
    #1;
    for (int i = 0; i < N; i++) begin
      if (v[i] && connected(i, 0, N-1, 1)) e_all = 1;
      if (v[i] && connected(i, 3, 7, 1))   e_rng = 1;
      if (v[i] && connected(i, 1, 9, 2))   e_odd = 1;
    end
    checks += 3;
    if (line_all !== e_all) begin failures++; $display("FAIL all %b", v); end
    if (line_rng !== e_rng) begin failures++; $display("FAIL range %b", v); end
    if (line_odd !== e_odd) begin failures++; $display("FAIL stride %b", v); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    for (int i = 0; i < N; i++) apply(N'(1) << i);   // a single bit in every stage
    for (int n = 0; n < 500; n++) apply(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
