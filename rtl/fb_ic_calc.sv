// fb_ic_calc - capacitor current of the output filter.
//
//     i_R = G_L * v_O*          (load current, 18x25 product)
//     i_C = i_L* - i_R
//
// Purely combinational. G_L is the load conductance (Q0.17, this design's
// choice of format), v_O* the output voltage cut to Q9.15 and i_L* the
// inductor current cut to Q6.18, so the product fits one 18x25 multiplier.
// The product (fraction 32) is truncated to i_R in Q6.23 (30 bits) and then
// aligned to i_C in Q6.18 (25 bits). Truncation rounds towards minus
// infinity; sums wrap at the format width.
module fb_ic_calc
  import fb_pkg::*;
(
  input  ils_t il_s,
  input  vl_t  vo_s,
  input  k_t   gl,
  output ir_t  ir,
  output ils_t ic
);
  logic signed [MUL_P_W-1:0] p;

  fb_dsp_mul u_mul_g (.a(gl), .b(vo_s), .p(p));

  always_comb begin
    ir = ir_t'(p >>> (GL_F + VL_F - IR_F));
    ic = ils_t'(il_s - ils_t'(ir >>> (IR_F - ILS_F)));
  end
endmodule
