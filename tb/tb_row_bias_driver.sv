// tb_row_bias_driver: walks the selected row over eight rows (and tries no
// row and random patterns); the selected rows must carry Vb, all others 0 V.
module tb_row_bias_driver;
  import scanner_pkg::*;
  localparam int N = 8, VB = 750000;
  logic [N-1:0] row_sel;
  voltage_uv_t [N-1:0] bias;
  int checks = 0, failures = 0;

  row_bias_driver #(.N(N), .VB_UV(VB)) dut (.row_sel(row_sel), .row_bias_uv(bias));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      row_sel = (n < N) ? N'(1) << n : (n == N) ? '0 : N'($urandom);
      #1;
      for (int r = 0; r < N; r++) begin
        checks++;
        if (bias[r] != (row_sel[r] ? VB : 0)) begin failures++; $display("FAIL row %0d sel %b", r, row_sel); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
