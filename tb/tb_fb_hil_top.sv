// tb_fb_hil_top - end-to-end test of the HIL emulator at its default size.
//
// Phase 1 (internal DPWM): the converter of the evaluation - V_in = 200 V,
// 20 kHz bipolar PWM with D = 0.75 at a 16 ns step (3125 cycles per period,
// compare 2344), G_L = 1/16 S, R_dson = 0.1, R_L = 0.005, R_ESR = 0.36,
// R_D = 0.8 ohm, V_D = 0.7 V; L = 1 mH and C = 100 uF are this test's choice.
// It runs from rest for 30 ms (SIM_MS can shorten it). Checks:
//   * every step, v_C, i_L and v_O against a double-precision Euler model
//     fed with the switch states the design applies (max error limits);
//   * the steady-state mean output voltage against the lossy closed form
//     (2D-1) V_in / (1 + (2 R_dson + R_L) G_L) = 98.73 V, and mean i_L = G_L v_O;
//   * the DPWM period (one start pulse every 3125 cycles).
// Phase 2 (external controller, sw_sel = 1): switch patterns that the DPWM
// never makes - all off, a single switch, both high-side switches - pass
// through the input synchronizer (two-cycle latency checked) and drive the
// model into all three conduction situations and negative inductor current,
// still tracked by the double-precision model.
// Every mechanism (situation I, II, III, i_L < 0, DPWM source, external
// source, source switch-over) is counted and must occur at least once.
module tb_fb_hil_top;
  import fb_pkg::*;
  import tb_fb_ref_pkg::*;

  logic clk = 0, rst = 1, en = 1;
  vin_t vin; k_t gl, dt_l, dt_c; loss_t loss;
  logic sw_sel; sw_t sw_ext, sw;
  logic [15:0] pwm_period, pwm_duty_cmp;
  vc_t vc, vo; il_t il; situation_e sit; logic pwm_start;

  fb_hil_top dut (.clk, .rst, .en, .vin, .gl, .dt_l, .dt_c, .loss, .sw_sel, .sw_ext,
    .pwm_period, .pwm_duty_cmp, .vc, .il, .vo, .sw, .sit, .pwm_start);

  always #8 clk = ~clk;   // 16 ns step

  int checks = 0, failures = 0;
  int n_sit [3];
  int n_neg = 0, n_int = 0, n_ext = 0, n_switch = 0, n_start = 0;
  int sim_ms = 30;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rstate_t r;
  rparam_t rp;
  real e, max_vc = 0, max_il = 0, max_vo = 0;
  real sum_vo, sum_il, min_il, max_il_p, min_vo, max_vo_p, min_vc, max_vc_p;
  int last_start, per_errs = 0;
  logic prev_sel;

  function automatic real fvc(vc_t x); return real'(x) / 2.0**30; endfunction
  function automatic real fil(il_t x); return real'(x) / 2.0**33; endfunction

  // One clock with the double-precision model following the applied switches
  task automatic step();
    sw_t applied;
    applied = sw;
    @(posedge clk);
    r = real_step(r, applied, rp, 1'b1);
    #1;
    e = fvc(vc) - r.vc;            if (e < 0) e = -e; if (e > max_vc) max_vc = e;
    e = fil(il) - r.il;            if (e < 0) e = -e; if (e > max_il) max_il = e;
    e = fvc(vo) - (r.vc + r.vresr); if (e < 0) e = -e; if (e > max_vo) max_vo = e;
    n_sit[int'(sit)]++;
    if (il < 0) n_neg++;
    if (sw_sel) n_ext++; else n_int++;
    if (sw_sel != prev_sel) n_switch++;
    prev_sel = sw_sel;
  endtask

  initial begin
    int cycles, t0;
    if ($value$plusargs("SIM_MS=%d", sim_ms)) ;
    vin  = vin_t'(200 * 4);
    gl   = k_t'(8192);
    dt_l = k_t'(68719);   // 16 ns / 1 mH   * 2^32
    dt_c = k_t'(85899);   // 16 ns / 100 uF * 2^29
    loss = '{rdson: k_t'(819), rd: k_t'(6554), rl: k_t'(41), resr: k_t'(2949), vd: k_t'(22938)};
    rp = '{vin: 200.0, gl: 0.0625, dtl: 68719.0 / 2.0**32, dtc: 85899.0 / 2.0**29,
           rdson: 819.0/8192.0, rd: 6554.0/8192.0, rl: 41.0/8192.0, resr: 2949.0/8192.0,
           vd: 22938.0/32768.0};
    sw_sel = 0; sw_ext = '0; prev_sel = 0;
    pwm_period = 16'd3125; pwm_duty_cmp = 16'd2344;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    r = '{0.0, 0.0, 0.0};
    // ---------------- Phase 1: open loop with the DPWM ----------------
    cycles = sim_ms * 62500;
    last_start = -1;
    for (int n = 0; n < cycles; n++) begin
      step();
      if (pwm_start) begin
        n_start++;
        if (last_start >= 0 && n - last_start != 3125) per_errs++;
        last_start = n;
      end
    end
    checks++;
    if (per_errs != 0 || n_start < cycles / 3125 - 1) begin
      failures++; $display("FAIL DPWM period errors=%0d starts=%0d", per_errs, n_start);
    end
    // align to a period start and measure one switching period
    while (!pwm_start) step();
    sum_vo = 0; sum_il = 0;
    min_il = 1e9; max_il_p = -1e9; min_vo = 1e9; max_vo_p = -1e9; min_vc = 1e9; max_vc_p = -1e9;
    for (int n = 0; n < 3125; n++) begin
      sum_vo += fvc(vo); sum_il += fil(il);
      if (fil(il) < min_il) min_il = fil(il);
      if (fil(il) > max_il_p) max_il_p = fil(il);
      if (fvc(vo) < min_vo) min_vo = fvc(vo);
      if (fvc(vo) > max_vo_p) max_vo_p = fvc(vo);
      if (fvc(vc) < min_vc) min_vc = fvc(vc);
      if (fvc(vc) > max_vc_p) max_vc_p = fvc(vc);
      step();
    end
    $display("steady state after %0d ms: mean vO=%f V (closed form 98.735), mean iL=%f A",
             sim_ms, sum_vo / 3125.0, sum_il / 3125.0);
    $display("ripple: vC=%f V  iL=%f A  vO=%f V", max_vc_p - min_vc, max_il_p - min_il, max_vo_p - min_vo);
    checks++;
    if (sim_ms >= 25) begin
      e = sum_vo / 3125.0 - 100.0 / (1.0 + 0.205 * 0.0625); if (e < 0) e = -e;
      if (e > 0.05) begin failures++; $display("FAIL mean vO"); end
      checks++;
      e = sum_il / 3125.0 - 0.0625 * sum_vo / 3125.0; if (e < 0) e = -e;
      if (e > 0.01) begin failures++; $display("FAIL mean iL"); end
    end
    // ---------------- Phase 2: external controller ----------------
    #1 sw_sel = 1; sw_ext = '0;                          // all off
    repeat (2000) step();                                // i_L falls through zero
    // the applied pattern must follow sw_ext exactly two clocks later
    sw_ext = '{q1: 1'b1, default: 1'b0};                  // only Q1
    t0 = 0;
    while (sw != sw_ext && t0 < 10) begin step(); t0++; end
    checks++;
    if (t0 != 2) begin failures++; $display("FAIL synchronizer latency %0d", t0); end
    repeat (3000) step();
    sw_ext = '{q1: 1'b1, q2: 1'b1, default: 1'b0}; repeat (3000) step(); // freewheel
    sw_ext = '{q2: 1'b1, q4: 1'b1, default: 1'b0}; repeat (2500) step();  // -V_in
    sw_ext = '{q4: 1'b1, default: 1'b0};  repeat (3000) step();   // only Q4
    sw_ext = '0;                          repeat (3000) step();   // all off, i_L < 0
    sw_ext = '{q3: 1'b1, default: 1'b0};  repeat (3000) step();   // only Q3
    #1 sw_sel = 0;                        repeat (6250) step();   // back to the DPWM

    $display("max |error| vs double model: vC %e V, iL %e A, vO %e V", max_vc, max_il, max_vo);
    checks++;
    if (max_vc > 0.02 || max_il > 0.02 || max_vo > 0.02) begin failures++; $display("FAIL accuracy"); end
    $display("events: sit I=%0d III=%0d II=%0d iL<0=%0d dpwm=%0d ext=%0d switches=%0d starts=%0d",
             n_sit[0], n_sit[1], n_sit[2], n_neg, n_int, n_ext, n_switch, n_start);
    checks++; if (n_sit[0] == 0) begin failures++; $display("FAIL no situation I"); end
    checks++; if (n_sit[1] == 0) begin failures++; $display("FAIL no situation III"); end
    checks++; if (n_sit[2] == 0) begin failures++; $display("FAIL no situation II"); end
    checks++; if (n_neg == 0)    begin failures++; $display("FAIL no negative current"); end
    checks++; if (n_int == 0 || n_ext == 0 || n_switch < 2) begin failures++; $display("FAIL source switch"); end
    checks++; if (n_start == 0)  begin failures++; $display("FAIL no DPWM period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
