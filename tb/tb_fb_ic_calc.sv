// tb_fb_ic_calc - self-checking test of the capacitor-current unit.
//
// Random i_L*, v_O* and G_L (plus the corner values of each format) are
// applied; i_R and i_C are compared with values computed from real numbers:
// i_R = floor(G_L * v_O * 2^23) and i_C = i_L* - floor(i_R / 2^5), all in
// units of the output formats. A known case (G_L = 1/16 S, v_O = 100 V,
// i_L = 6.25 A) is checked explicitly.
module tb_fb_ic_calc;
  import fb_pkg::*;

  ils_t il_s; vl_t vo_s; k_t gl; ir_t ir; ils_t ic;
  int checks = 0, failures = 0;

  fb_ic_calc dut (.il_s, .vo_s, .gl, .ir, .ic);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    real g, v, ir_r;
    longint e_ir, e_ic;
    #1;
    g = real'(gl) / 2.0**17;
    v = real'(vo_s) / 2.0**15;
    ir_r = g * v * 2.0**23;               // exact in a double (< 2^53)
    e_ir = longint'($floor(ir_r));
    e_ic = longint'(il_s) - longint'($floor(real'(e_ir) / 32.0));
    e_ir = longint'(ir_t'(e_ir));
    e_ic = longint'(ils_t'(e_ic));
    checks++;
    if (longint'(ir) != e_ir || longint'(ic) != e_ic) begin
      failures++;
      if (failures < 10) $display("FAIL gl=%0d vo=%0d il=%0d ir=%0d/%0d ic=%0d/%0d", gl, vo_s, il_s, ir, e_ir, ic, e_ic);
    end
  endtask

  initial begin
    // G_L = 0.0625 S, v_O = 100 V, i_L = 6.25 A -> i_C = 0
    gl = k_t'(8192); vo_s = vl_t'(100 * 2**15); il_s = ils_t'(6.25 * 2**18);
    #1;
    checks++;
    if (ic != 0 || ir != ir_t'(6.25 * 2**23)) begin failures++; $display("FAIL known case ic=%0d ir=%0d", ic, ir); end
    for (int n = 0; n < 5000; n++) begin
      il_s = ils_t'($urandom);
      vo_s = vl_t'($urandom);
      gl   = (n % 3 == 0) ? k_t'($urandom_range(0, 2**16)) : k_t'($urandom);
      if (n % 7 == 0) vo_s = (n % 2) ? vl_t'({1'b1, 24'b0}) : vl_t'({1'b0, {24{1'b1}}});
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
