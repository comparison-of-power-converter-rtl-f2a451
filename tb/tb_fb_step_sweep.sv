// tb_fb_step_sweep - numerical error of the emulator against the simulation
// step.
//
// The emulator (default build, with losses) runs the open-loop case of the
// evaluation (200 V, 20 kHz, D = 0.75, non-ideal parasitics; L = 1 mH and
// C = 100 uF chosen here) with a step of 24, 20, 16 and 1 ns: dt/L and dt/C
// are scaled to the step and the DPWM period to 50 us / dt. A double-precision
// Euler model with a fixed 1 ns step runs alongside (dt/1ns sub-steps per
// emulator step) as the accuracy reference. Over the first 2 ms (the start-up
// transient) the mean absolute error of v_C, i_L and v_O is reported in
// percent of the steady-state value (98.74 V, 6.17 A). Checks: the error shrinks as the
// step shrinks from 24 to 20 to 16 ns, and every error stays below 0.05 %.
// Each run restarts the emulator from reset.
module tb_fb_step_sweep;
  import fb_pkg::*;
  import tb_fb_ref_pkg::*;

  logic clk = 0, rst = 1, en = 1;
  vin_t vin; k_t gl, dt_l, dt_c; loss_t loss;
  logic [15:0] per, cmp;
  vc_t vc, vo; il_t il; sw_t sw; situation_e sit; logic st;

  fb_hil_top dut (.clk, .rst, .en, .vin, .gl, .dt_l, .dt_c, .loss, .sw_sel(1'b0), .sw_ext('0),
    .pwm_period(per), .pwm_duty_cmp(cmp), .vc, .il, .vo, .sw, .sit, .pwm_start(st));

  always #8 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ab(real x); return x < 0 ? -x : x; endfunction

  // steady-state output voltage, (2D-1) V_in / (1 + (2 R_dson + R_L) G_L)
  localparam real VO_SS = 100.0 / (1.0 + 0.205 * 0.0625);

  int  steps_ns [4] = '{24, 20, 16, 1};
  real err_vc [4], err_il [4], err_vo [4];

  task automatic run(input int k);
    int dt, nsteps;
    rstate_t r;
    rparam_t rp;
    real dtl_r, dtc_r, svc, sil, svo;
    dt = steps_ns[k];
    dtl_r = real'(dt) * 1e-9 / 1e-3;
    dtc_r = real'(dt) * 1e-9 / 100e-6;
    dt_l = k_t'(longint'(dtl_r * 2.0**32 + 0.5));
    dt_c = k_t'(longint'(dtc_r * 2.0**29 + 0.5));
    per  = 16'(50000 / dt);
    cmp  = 16'((3 * 50000 / dt + 2) / 4);
    rp = '{vin: 200.0, gl: 0.0625, dtl: 1e-9 / 1e-3, dtc: 1e-9 / 100e-6,
           rdson: 819.0/8192.0, rd: 6554.0/8192.0, rl: 41.0/8192.0, resr: 2949.0/8192.0,
           vd: 22938.0/32768.0};
    r = '{0.0, 0.0, 0.0};
    rst = 1; @(posedge clk); @(posedge clk); #1 rst = 0;
    nsteps = 2000000 / dt;          // 2 ms
    svc = 0; sil = 0; svo = 0;
    for (int n = 0; n < nsteps; n++) begin
      sw_t applied;
      applied = sw;
      @(posedge clk);
      for (int j = 0; j < dt; j++) r = real_step(r, applied, rp, 1'b1);
      #1;
      svc += ab(real'(vc) / 2.0**30 - r.vc);
      sil += ab(real'(il) / 2.0**33 - r.il);
      svo += ab(real'(vo) / 2.0**30 - (r.vc + r.vresr));
    end
    err_vc[k] = 100.0 * svc / nsteps / VO_SS;
    err_il[k] = 100.0 * sil / nsteps / (VO_SS * 0.0625);
    err_vo[k] = 100.0 * svo / nsteps / VO_SS;
    $display("dt=%2d ns: error %% vC %e  iL %e  vO %e", dt, err_vc[k], err_il[k], err_vo[k]);
  endtask

  initial begin
    vin = vin_t'(800); gl = k_t'(8192);
    loss = '{rdson: k_t'(819), rd: k_t'(6554), rl: k_t'(41), resr: k_t'(2949), vd: k_t'(22938)};
    for (int k = 0; k < 4; k++) run(k);
    checks++;
    if (!(err_vc[0] > err_vc[1] && err_vc[1] > err_vc[2])) begin failures++; $display("FAIL vC error not decreasing"); end
    checks++;
    if (!(err_vo[0] > err_vo[1] && err_vo[1] > err_vo[2])) begin failures++; $display("FAIL vO error not decreasing"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (err_vc[k] > 0.05 || err_il[k] > 0.05 || err_vo[k] > 0.05) begin
        failures++; $display("FAIL error too large at %0d ns", steps_ns[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
