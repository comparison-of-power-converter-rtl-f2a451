// fb_model - real-time full-bridge converter model, optimized fixed point.
//
// Emulates a full-bridge converter with an output LC filter and a resistive
// load, including the conduction losses of MOSFETs, diodes, inductor and
// capacitor ESR. Each enabled clock cycle is one explicit-Euler step:
//
//     v_C(k) = v_C(k-1) + dt/C * i_C(k-1)
//     i_L(k) = i_L(k-1) + dt/L * v_L(k-1)
//     v_O(k) = v_C(k)   + R_ESR * i_C(k-1)
//     i_C    = i_L - G_L v_O
//     v_L    = s V_in - v_O - v_L-loss   (selected by Q1..Q4 and sign(i_L))
//
// The whole step is one combinational path from the state registers back to
// them; it is deliberately not pipelined, since a register inside the loop
// would change the difference equations. The state variables keep wide
// formats (v_C Q9.30, i_L Q6.33) while the feedback signals are cut to
// v_O* Q9.15 and i_L* Q6.18 so that all five products (G_L v_O*,
// R_path i_L*, dt/C i_C, dt/L v_L, R_ESR i_C) fit 18x25 DSP multipliers.
// These widths follow the source design's optimized model; the Q formats of
// G_L, V_D and the resistances are this design's own.
//
// Inputs are read every cycle, so any modulation can drive sw. All model
// parameters (V_in, G_L, dt/L, dt/C, losses) are run-time inputs; dt is the
// clock period when en is tied high. Synchronous reset clears the states.
// Outputs: vc, il, vo (Q9.30/Q6.33/Q9.30), plus the internal vl, ic and the
// conduction situation for observation. LOSSES = 0 builds the ideal model.
module fb_model
  import fb_pkg::*;
#(
  parameter bit LOSSES = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  vin_t       vin,
  input  k_t         gl,
  input  k_t         dt_l,
  input  k_t         dt_c,
  input  loss_t      loss,
  input  sw_t        sw,
  output vc_t        vc,
  output il_t        il,
  output vc_t        vo,
  output vl_t        vl,
  output ils_t       ic,
  output situation_e sit
);
  vl_t  vo_s;
  ils_t il_s;
  ir_t  ir;
  vc_t  vresr;
  vc_t  dvc;
  il_t  dil;

  // Feedback signals cut to the multiplier widths
  always_comb begin
    vo_s = vl_t'(vo >>> (VC_F - VL_F));
    il_s = ils_t'(il >>> (IL_F - ILS_F));
  end

  fb_ic_calc u_ic (.il_s(il_s), .vo_s(vo_s), .gl(gl), .ir(ir), .ic(ic));

  fb_vl_calc #(.LOSSES(LOSSES)) u_vl (
    .vin(vin), .vo_s(vo_s), .il_s(il_s), .sw(sw), .loss(loss),
    .vl(vl), .sit(sit)
  );

  // Block 1: capacitor voltage
  fb_integrator #(.STATE_W(VC_W), .SHIFT(DTC_F + ILS_F - VC_F)) u_int_vc (
    .clk(clk), .rst(rst), .en(en), .coef(dt_c), .u(ic), .state(vc), .incr(dvc)
  );

  // Block 2: inductor current
  fb_integrator #(.STATE_W(IL_W), .SHIFT(DTL_F + VL_F - IL_F)) u_int_il (
    .clk(clk), .rst(rst), .en(en), .coef(dt_l), .u(vl), .state(il), .incr(dil)
  );

  fb_vout #(.LOSSES(LOSSES)) u_vout (
    .clk(clk), .rst(rst), .en(en), .resr(loss.resr), .ic(ic), .vc(vc),
    .vo(vo), .vresr(vresr)
  );

  // Both switches of one leg must never be on together
  a_no_shoot_through: assert property (@(posedge clk) disable iff (rst)
    !(sw.q1 && sw.q4) && !(sw.q2 && sw.q3));

endmodule
