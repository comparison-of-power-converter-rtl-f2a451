// fb_vl_calc - inductor voltage of the full bridge (the v_L multiplexer).
//
// Computes, combinationally, the voltage across the inductor for the present
// switch states and inductor-current sign:
//
//     v_L = s * V_in - v_O* - v_L-loss,    s in {-1, 0, +1}
//     v_L-loss = n_D * V_D * sign(i_L) + R_path * i_L*
//
// Each bridge leg conducts through its MOSFET when one of its switches is on
// (an on MOSFET carries current both ways) and through one of its
// anti-parallel diodes when both are off; the diode that conducts depends on
// the sign of i_L. From that follow the source term s, the number of diodes
// in the path n_D, and the path resistance:
//   situation I   (two MOSFETs)          R_path = 2 R_dson + R_L
//   situation III (one MOSFET, one diode) R_path = R_dson + R_D + R_L
//   situation II  (two diodes, all off)  R_path = 2 R_D + R_L
// These are the eight cases of the source model's v_L equation plus the two
// freewheeling states (Q1+Q2, Q3+Q4), which follow from the same leg rules.
// The five select inputs are Q1..Q4 and the sign bit of i_L; i_L = 0 counts as
// positive. A leg with both switches on (shoot-through) is forbidden; the
// high-side switch then takes priority.
//
// Only one multiplier is used (R_path x i_L*, 18x25); the diode drop needs
// only a sign change, so it needs no multiplier. With LOSSES = 0 the loss
// term is removed and the ideal converter remains.
//
// Formats: vin Q8.2, vo_s Q9.15, il_s Q6.18, loss resistances Q4.13, V_D
// Q2.15, result vl Q9.15. The situations, loss terms and the v_L format follow
// the source design; the resistance and V_D formats are this design's own. Products are truncated (rounded towards minus
// infinity); sums wrap at the format width.
module fb_vl_calc
  import fb_pkg::*;
#(
  parameter bit LOSSES = 1'b1
) (
  input  vin_t        vin,
  input  vl_t         vo_s,
  input  ils_t        il_s,
  input  sw_t         sw,
  input  loss_t       loss,
  output vl_t         vl,
  output situation_e  sit
);
  localparam int SUM_W = VL_W + 3;

  logic              il_neg;
  logic              leg_a_mos, leg_b_mos;
  logic              src_a, src_b;       // leg node tied to V_in (1) or 0 V (0)
  logic [1:0]        n_diode;
  logic signed [K_W+1:0] r_wide;
  k_t                r_path;
  logic signed [MUL_P_W-1:0] r_prod;
  logic signed [SUM_W-1:0]   v_src, v_diode, v_res, v_sum;

  always_comb begin
    il_neg    = il_s[ILS_W-1];
    leg_a_mos = sw.q1 | sw.q4;
    leg_b_mos = sw.q2 | sw.q3;
    // Leg A (node current i_L leaves): off leg -> D4 for i_L>0, D1 for i_L<0.
    if (sw.q1)      src_a = 1'b1;
    else if (sw.q4) src_a = 1'b0;
    else            src_a = il_neg;
    // Leg B (node current i_L enters): off leg -> D2 for i_L>0, D3 for i_L<0.
    if (sw.q2)      src_b = 1'b1;
    else if (sw.q3) src_b = 1'b0;
    else            src_b = ~il_neg;
    n_diode = 2'(!leg_a_mos) + 2'(!leg_b_mos);
    unique case (n_diode)
      2'd0:    sit = SIT_I;
      2'd1:    sit = SIT_III;
      default: sit = SIT_II;
    endcase
  end

  // Path resistance of the active situation (kept to 18 bits: sums above
  // 16 ohm are outside the Q4.13 range).
  always_comb begin
    unique case (sit)
      SIT_I:   r_wide = 2 * (K_W+2)'(loss.rdson) + (K_W+2)'(loss.rl);
      SIT_III: r_wide = (K_W+2)'(loss.rdson) + (K_W+2)'(loss.rd) + (K_W+2)'(loss.rl);
      default: r_wide = 2 * (K_W+2)'(loss.rd) + (K_W+2)'(loss.rl);
    endcase
    r_path = k_t'(r_wide);
  end

  fb_dsp_mul u_mul_r (.a(r_path), .b(il_s), .p(r_prod));

  always_comb begin
    // V_in Q8.2 -> Q9.15, signed by the leg difference
    unique case ({src_a, src_b})
      2'b10:   v_src =  SUM_W'(vin) <<< (VL_F - VIN_F);
      2'b01:   v_src = -(SUM_W'(vin) <<< (VL_F - VIN_F));
      default: v_src = '0;
    endcase
    if (LOSSES) begin
      // V_D Q2.15 is already on the Q9.15 grid
      unique case (n_diode)
        2'd0:    v_diode = '0;
        2'd1:    v_diode = SUM_W'(loss.vd);
        default: v_diode = SUM_W'(loss.vd) <<< 1;
      endcase
      if (il_neg) v_diode = -v_diode;
      // Q4.13 x Q6.18 = Q.31 -> Q.15
      v_res   = SUM_W'(r_prod >>> (R_F + ILS_F - VL_F));
    end else begin
      v_diode = '0;
      v_res   = '0;
    end
    v_sum = v_src - SUM_W'(vo_s) - v_diode - v_res;
    vl    = vl_t'(v_sum);
  end

endmodule
