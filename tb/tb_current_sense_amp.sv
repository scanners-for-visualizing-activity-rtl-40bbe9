// tb_current_sense_amp: a linear and a logarithmic sense amplifier see the
// same currents. Expected outputs are computed here in floating point:
// linear Vref + I*R exactly (to 1 uV), logarithmic (Vref + UT ln(I/I0))/kappa
// within 3 mV (the model's logarithm is piecewise linear), square-root law
// (Vref + VT + sqrt(I/I0'))/kappa within 3 uV. The logarithmic
// output must also rise with current and stay at Vref/kappa for I <= I0.
module tb_current_sense_amp;
  import scanner_pkg::*;
  localparam int R = 2000000, VREF = 1000000, I0 = 5, KP = 700;
  current_pa_t i;
  localparam int VT = 750000, I0P = 20000000;
  voltage_uv_t v_lin, v_log, v_sqrt;
  int checks = 0, failures = 0;

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  current_sense_amp #(.MODE(SENSE_LINEAR), .R_OHM(R), .VREF_UV(VREF)) u_lin (.i_pa(i), .v_out_uv(v_lin));
  current_sense_amp #(.MODE(SENSE_LOG), .VREF_UV(VREF), .I0_FA(I0), .KAPPA_PERMIL(KP)) u_log (.i_pa(i), .v_out_uv(v_log));

  current_sense_amp #(.MODE(SENSE_SQRT), .VREF_UV(VREF), .KAPPA_PERMIL(KP), .VT_UV(VT), .I0P_PA_PER_V2(I0P))
    u_sqrt (.i_pa(i), .v_out_uv(v_sqrt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e_lin, e_log, e_sqrt;
    int prev_log = 0;
    for (int n = 0; n < 800; n++) begin
      if (n < 400) i = $signed($urandom_range(0, 400000)) - 200000;      // +-200 nA, linear range
      else         i = 1 << (n % 24) | $urandom_range(0, 1 << (n % 24)); // 1 pA .. 16 uA, log range
      #1;
      e_lin = VREF + real'(i) * R * 1.0e-6;
      checks++;
      if (fabs(real'(v_lin) - e_lin) > 1.0) begin failures++; $display("FAIL linear I=%0d got %0d exp %0f", i, v_lin, e_lin); end
      if (i > 0) begin
        e_log = (VREF + 25852.0 * $ln(real'(i) * 1000.0 / I0)) * 1000.0 / KP;
        checks++;
        if (fabs(real'(v_log) - e_log) > 3000.0) begin failures++; $display("FAIL log I=%0d got %0d exp %0f", i, v_log, e_log); end
      end
      e_sqrt = (VREF + VT + 1.0e6 * $sqrt(((i > 0) ? real'(i) : 0.0) / I0P)) * 1000.0 / KP;
      checks++;
      if (fabs(real'(v_sqrt) - e_sqrt) > 3.0) begin failures++; $display("FAIL sqrt I=%0d got %0d exp %0f", i, v_sqrt, e_sqrt); end
    end
    // monotonic in current
    for (int k = 1; k < 1000000; k = k * 3 + 1) begin
      i = k; #1;
      checks++;
      if (v_log < prev_log) begin failures++; $display("FAIL not monotonic at %0d", k); end
      prev_log = v_log;
    end
    // at and below I0 the logarithm is clamped to zero
    i = 0; #1;
    checks++;
    if (v_log != VREF * 1000 / KP) begin failures++; $display("FAIL zero current %0d", v_log); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
