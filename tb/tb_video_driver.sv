// tb_video_driver: a non-inverting and an inverting video driver with random
// sense voltages and blank inputs. Expected: blank level while either blank is
// active, otherwise black + (+-)gain*(Vsense - Vref) clamped to black..full.
module tb_video_driver;
  import scanner_pkg::*;
  localparam int G = 1500, VR = 2000000, VBL = 0, VBK = 60000, VF = 1000000;
  voltage_uv_t vs, v_pos, v_inv;
  logic hb, vb;
  int checks = 0, failures = 0, clamped = 0, blanked = 0;

  video_driver #(.INVERT(1'b0), .GAIN_PERMIL(G), .V_SENSE_REF_UV(VR), .V_BLANK_UV(VBL), .V_BLACK_UV(VBK), .V_FULL_UV(VF))
    u_pos (.v_sense_uv(vs), .hblank(hb), .vblank(vb), .video_uv(v_pos));
  video_driver #(.INVERT(1'b1), .GAIN_PERMIL(G), .V_SENSE_REF_UV(VR), .V_BLANK_UV(VBL), .V_BLACK_UV(VBK), .V_FULL_UV(VF))
    u_inv (.v_sense_uv(vs), .hblank(hb), .vblank(vb), .video_uv(v_inv));

  function automatic longint expect_level(longint v, bit inv, bit blank);
    longint d = inv ? (VR - v) : (v - VR);
    longint l = VBK + (d * G) / 1000;
    if (blank) return VBL;
    if (l < VBK) l = VBK;
    if (l > VF) l = VF;
    return l;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      vs = VR + $signed($urandom_range(0, 1600000)) - 800000;
      hb = ($urandom_range(0, 3) == 0);
      vb = ($urandom_range(0, 5) == 0);
      #1;
      checks += 2;
      if (v_pos != expect_level(vs, 0, hb | vb)) begin failures++; $display("FAIL pos vs=%0d got %0d", vs, v_pos); end
      if (v_inv != expect_level(vs, 1, hb | vb)) begin failures++; $display("FAIL inv vs=%0d got %0d", vs, v_inv); end
      if (hb | vb) blanked++;
      else if (v_pos == VF || v_inv == VF) clamped++;
    end
    checks++;
    if (blanked == 0 || clamped == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
