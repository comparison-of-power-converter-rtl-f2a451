// tb_fb_losses - the emulator with and without losses, side by side.
//
// Two emulators run the same open-loop case (200 V, 20 kHz, D = 0.75,
// G_L = 1/16 S, L = 1 mH and C = 100 uF chosen here, 16 ns step) for 30 ms:
// one built with losses (default) and fed the non-ideal parasitics, one built
// with LOSSES = 0. Checks:
//   * ideal build: steady-state mean v_O = (2D-1) V_in = 100 V (within 0.1 V;
//     the compare value 2344/3125 makes D = 0.75008) and v_O = v_C;
//   * ideal build: i_L ripple = (V_in - v_O) D T / L = 3.75 A (within 3 %);
//   * the error made by leaving out the losses, as a mean absolute error in
//     percent of the lossy model's final value, is above 1 % in steady state
//     for v_C and v_O (the parasitics lower v_O by about 1.3 %), and larger
//     in the transient than in steady state.
module tb_fb_losses;
  import fb_pkg::*;

  logic clk = 0, rst = 1, en = 1;
  vin_t vin; k_t gl, dt_l, dt_c; loss_t loss;
  logic [15:0] per, cmp;
  vc_t vc1, vo1, vc0, vo0; il_t il1, il0; sw_t sw1, sw0;
  situation_e sit1, sit0; logic st1, st0;

  fb_hil_top dut_wl (.clk, .rst, .en, .vin, .gl, .dt_l, .dt_c, .loss, .sw_sel(1'b0), .sw_ext('0),
    .pwm_period(per), .pwm_duty_cmp(cmp), .vc(vc1), .il(il1), .vo(vo1), .sw(sw1), .sit(sit1), .pwm_start(st1));
  fb_hil_top #(.LOSSES(1'b0)) dut_wol (.clk, .rst, .en, .vin, .gl, .dt_l, .dt_c, .loss,
    .sw_sel(1'b0), .sw_ext('0), .pwm_period(per), .pwm_duty_cmp(cmp),
    .vc(vc0), .il(il0), .vo(vo0), .sw(sw0), .sit(sit0), .pwm_start(st0));

  always #8 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fv(vc_t x); return real'(x) / 2.0**30; endfunction
  function automatic real fi(il_t x); return real'(x) / 2.0**33; endfunction
  function automatic real ab(real x); return x < 0 ? -x : x; endfunction

  localparam int TR = 10 * 62500;   // first 10 ms: transient window
  localparam int N  = 30 * 62500;

  real e_vc [2], e_il [2], e_vo [2];
  int  cnt [2];
  int  n_bad = 0;
  real vc_fin, il_fin, vo_fin, sum_vo0, il0_min, il0_max;
  real vc_hist [];  real il_hist [];  real vo_hist [];
  real vc0_hist []; real il0_hist []; real vo0_hist [];

  initial begin
    vin = vin_t'(800); gl = k_t'(8192); dt_l = k_t'(68719); dt_c = k_t'(85899);
    loss = '{rdson: k_t'(819), rd: k_t'(6554), rl: k_t'(41), resr: k_t'(2949), vd: k_t'(22938)};
    per = 16'd3125; cmp = 16'd2344;
    vc_hist = new[N]; il_hist = new[N]; vo_hist = new[N];
    vc0_hist = new[N]; il0_hist = new[N]; vo0_hist = new[N];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < N; n++) begin
      @(posedge clk); #1;
      vc_hist[n] = fv(vc1); il_hist[n] = fi(il1); vo_hist[n] = fv(vo1);
      vc0_hist[n] = fv(vc0); il0_hist[n] = fi(il0); vo0_hist[n] = fv(vo0);
      if (vo0 != vc0) n_bad++;
    end
    checks++;
    if (n_bad != 0) begin failures++; $display("FAIL ideal vO != vC in %0d cycles", n_bad); end
    // final values of the lossy model: means over the last switching period
    vc_fin = 0; il_fin = 0; vo_fin = 0; sum_vo0 = 0; il0_min = 1e9; il0_max = -1e9;
    for (int n = N - 3125; n < N; n++) begin
      vc_fin += vc_hist[n] / 3125.0; il_fin += il_hist[n] / 3125.0; vo_fin += vo_hist[n] / 3125.0;
      sum_vo0 += vo0_hist[n] / 3125.0;
      if (il0_hist[n] < il0_min) il0_min = il0_hist[n];
      if (il0_hist[n] > il0_max) il0_max = il0_hist[n];
    end
    for (int w = 0; w < 2; w++) begin e_vc[w] = 0; e_il[w] = 0; e_vo[w] = 0; cnt[w] = 0; end
    for (int n = 0; n < N; n++) begin
      int w;
      w = (n < TR) ? 0 : 1;
      e_vc[w] += ab(vc0_hist[n] - vc_hist[n]);
      e_il[w] += ab(il0_hist[n] - il_hist[n]);
      e_vo[w] += ab(vo0_hist[n] - vo_hist[n]);
      cnt[w]++;
    end
    for (int w = 0; w < 2; w++) begin
      e_vc[w] = 100.0 * e_vc[w] / cnt[w] / vc_fin;
      e_il[w] = 100.0 * e_il[w] / cnt[w] / il_fin;
      e_vo[w] = 100.0 * e_vo[w] / cnt[w] / vo_fin;
    end
    $display("with losses: mean vC=%f vO=%f iL=%f", vc_fin, vo_fin, il_fin);
    $display("without losses: mean vO=%f  iL ripple=%f", sum_vo0, il0_max - il0_min);
    $display("error of the lossless model (%%): vC %f / %f, iL %f / %f, vO %f / %f (transient / steady)",
             e_vc[0], e_vc[1], e_il[0], e_il[1], e_vo[0], e_vo[1]);
    checks++;
    if (ab(sum_vo0 - 100.0) > 0.1) begin failures++; $display("FAIL ideal mean vO"); end
    checks++;
    if (ab((il0_max - il0_min) / 3.75 - 1.0) > 0.03) begin failures++; $display("FAIL ideal iL ripple"); end
    checks++;
    if (e_vc[1] < 1.0 || e_vo[1] < 1.0) begin failures++; $display("FAIL lossless error too small"); end
    checks++;
    if (e_vc[0] <= e_vc[1] || e_il[0] <= e_il[1]) begin failures++; $display("FAIL transient error not larger"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
