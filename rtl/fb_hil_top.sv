// fb_hil_top - hardware-in-the-loop emulator of a full-bridge converter.
//
// The converter model (fb_model) advances one explicit-Euler step per clock,
// so the clock period is the simulation step (16 ns at 62.5 MHz is the
// real-time target of the optimized fixed-point model). Its switch inputs come
// either from the controller under test (sw_ext, sw_sel = 1) or from the
// built-in DPWM (sw_sel = 0), which generates the open-loop bipolar pattern
// used to characterise the model. The external switch signals are passed
// through a two-flop synchronizer since they come from another device; this
// synchronizer is this design's own addition.
//
// Converter parameters (V_in, G_L, dt/L, dt/C, parasitics) and the DPWM
// period and compare value are run-time inputs. Outputs are the model's
// state variables v_C, i_L and output v_O, the switch states actually applied,
// and the conduction situation. Synchronous active-high reset.
module fb_hil_top
  import fb_pkg::*;
#(
  parameter bit LOSSES    = 1'b1,
  parameter int PWM_CNT_W = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  vin_t                 vin,
  input  k_t                   gl,
  input  k_t                   dt_l,
  input  k_t                   dt_c,
  input  loss_t                loss,
  input  logic                 sw_sel,
  input  sw_t                  sw_ext,
  input  logic [PWM_CNT_W-1:0] pwm_period,
  input  logic [PWM_CNT_W-1:0] pwm_duty_cmp,
  output vc_t                  vc,
  output il_t                  il,
  output vc_t                  vo,
  output sw_t                  sw,
  output situation_e           sit,
  output logic                 pwm_start
);
  sw_t  sw_pwm, sw_ext_m, sw_ext_s;
  vl_t  vl;
  ils_t ic;

  dpwm #(.CNT_W(PWM_CNT_W)) u_dpwm (
    .clk(clk), .rst(rst), .en(en), .period(pwm_period),
    .duty_cmp(pwm_duty_cmp), .sw(sw_pwm), .start(pwm_start)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_ext_m <= '0;
      sw_ext_s <= '0;
    end else begin
      sw_ext_m <= sw_ext;
      sw_ext_s <= sw_ext_m;
    end
  end

  always_comb sw = sw_sel ? sw_ext_s : sw_pwm;

  fb_model #(.LOSSES(LOSSES)) u_model (
    .clk(clk), .rst(rst), .en(en), .vin(vin), .gl(gl), .dt_l(dt_l),
    .dt_c(dt_c), .loss(loss), .sw(sw), .vc(vc), .il(il), .vo(vo),
    .vl(vl), .ic(ic), .sit(sit)
  );
endmodule
