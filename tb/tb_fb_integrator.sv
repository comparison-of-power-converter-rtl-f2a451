// tb_fb_integrator - self-checking test of the Euler state accumulator.
//
// Two instances (the v_C and the i_L configuration) are run for many cycles
// with random coefficients, inputs and enable; a model of the state in
// real arithmetic (floor of the scaled product, then a wrap to the state
// width) tracks each of them. Also checks synchronous reset and that no
// update happens while en is low: exactly one update per enabled clock.
module tb_fb_integrator;
  import fb_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  k_t coef_c, coef_l;
  logic signed [MUL_B_W-1:0] u_c, u_l;
  vc_t st_c, inc_c; il_t st_l, inc_l;
  longint m_c, m_l;
  int checks = 0, failures = 0, updates = 0;

  fb_integrator #(.STATE_W(VC_W), .SHIFT(DTC_F + ILS_F - VC_F)) dut_c (
    .clk, .rst, .en, .coef(coef_c), .u(u_c), .state(st_c), .incr(inc_c));
  fb_integrator #(.STATE_W(IL_W), .SHIFT(DTL_F + VL_F - IL_F)) dut_l (
    .clk, .rst, .en, .coef(coef_l), .u(u_l), .state(st_l), .incr(inc_l));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap40(longint x);
    return longint'(vc_t'(x));
  endfunction

  function automatic longint scaled(longint c, longint u, int sh);
    real p;
    p = real'(c) * real'(u) / (2.0 ** sh);   // |c*u| < 2^42: exact
    return longint'($floor(p));
  endfunction

  initial begin
    coef_c = '0; coef_l = '0; u_c = '0; u_l = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (st_c != 0 || st_l != 0) begin failures++; $display("FAIL reset"); end
    m_c = 0; m_l = 0;
    for (int n = 0; n < 20000; n++) begin
      coef_c = k_t'($urandom);
      coef_l = k_t'($urandom);
      u_c = MUL_B_W'($urandom);
      u_l = MUL_B_W'($urandom);
      en  = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) begin
        m_c = wrap40(m_c + scaled(coef_c, u_c, 17));
        m_l = wrap40(m_l + scaled(coef_l, u_l, 14));
        updates++;
      end
      #1;
      checks++;
      if (longint'(st_c) != m_c || longint'(st_l) != m_l) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d vc=%0d/%0d il=%0d/%0d", n, st_c, m_c, st_l, m_l);
      end
    end
    rst = 1; @(posedge clk); #1;
    checks++;
    if (st_c != 0 || st_l != 0) begin failures++; $display("FAIL reset 2"); end
    $display("updates=%0d", updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
