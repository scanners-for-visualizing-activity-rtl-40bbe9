// tb_hex_phase_select: random half-phase vectors; odd rows must take the
// first half-phase and even rows the stage output, column by column.
module tb_hex_phase_select;
  localparam int N = 10;
  logic [N-1:0] first, second, sel;
  logic odd_row;
  int checks = 0, failures = 0;

  hex_phase_select #(.N(N)) dut (.first(first), .second(second), .odd_row(odd_row), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      first = N'($urandom); second = N'($urandom); odd_row = 1'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (sel[i] !== (odd_row ? first[i] : second[i])) begin
          failures++; $display("FAIL column %0d odd=%0b", i, odd_row);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
