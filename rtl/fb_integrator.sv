// fb_integrator - forward-Euler accumulator of one state variable.
//
//     x(k) = x(k-1) + (coef * u(k-1)) >>> SHIFT
//
// One update per clock cycle in which en is high; the clock period is the
// simulation step dt that is folded into coef (dt/C or dt/L). The product
// coef x u is one 18x25 multiplier and is truncated (floor) onto the state's
// grid; the state wraps at STATE_W bits. A synchronous active-high reset
// clears the state (the converter starts discharged).
//
// Used twice in the plant model: for v_C (coef = dt/C Q-12.29, u = i_C Q6.18,
// state Q9.30, SHIFT = 17) and for i_L (coef = dt/L Q-15.32, u = v_L Q9.15,
// state Q6.33, SHIFT = 14). Defaults are the v_C instance.
// The accumulator and the formats follow the source design's optimized
// fixed-point model; the reset and the step enable are this design's own.
// Ports: clk, rst, en, coef, u, state (registered), incr (combinational
// increment that will be added at the next enabled edge).
module fb_integrator
  import fb_pkg::*;
#(
  parameter int STATE_W = VC_W,
  parameter int SHIFT   = DTC_F + ILS_F - VC_F
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  k_t                        coef,
  input  logic signed [MUL_B_W-1:0] u,
  output logic signed [STATE_W-1:0] state,
  output logic signed [STATE_W-1:0] incr
);
  logic signed [MUL_P_W-1:0] p;

  fb_dsp_mul u_mul (.a(coef), .b(u), .p(p));

  always_comb incr = STATE_W'(p >>> SHIFT);

  always_ff @(posedge clk) begin
    if (rst)     state <= '0;
    else if (en) state <= state + incr;
  end
endmodule
