// tb_scan_switch_array: random pixel currents (both signs) and select
// patterns (one-hot, none, several); the scan-out current must be the sum of
// the selected inputs and the reference current the sum of the others.
module tb_scan_switch_array;
  import scanner_pkg::*;
  localparam int N = 9;
  logic [N-1:0] sel;
  current_pa_t [N-1:0] i_in;
  current_pa_t i_scan, i_ref;
  int checks = 0, failures = 0;

  scan_switch_array #(.N(N)) dut (.sel(sel), .i_in_pa(i_in), .i_scan_pa(i_scan), .i_ref_pa(i_ref));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint es, er;
    for (int n = 0; n < 600; n++) begin
      for (int i = 0; i < N; i++) i_in[i] = $signed($urandom_range(0, 2000000)) - 500000;
      case (n % 3)
        0: sel = N'(1) << (n % N);
        1: sel = '0;
        default: sel = N'($urandom);
      endcase
      #1;
      es = 0; er = 0;
      for (int i = 0; i < N; i++) if (sel[i]) es += i_in[i]; else er += i_in[i];
      checks += 2;
      if (i_scan !== current_pa_t'(es)) begin failures++; $display("FAIL scan %0d expected %0d", i_scan, es); end
      if (i_ref  !== current_pa_t'(er)) begin failures++; $display("FAIL ref %0d expected %0d", i_ref, er); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
