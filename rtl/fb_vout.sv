// fb_vout - output voltage with the capacitor ESR drop (register VRESR).
//
//     VRESR(k) = R_ESR * i_C(k-1)
//     v_O(k)   = v_C(k) + VRESR(k)
//
// VRESR is registered on each enabled clock edge, at the same time as the
// state integrators update, so v_O(k) pairs v_C(k) with i_C(k-1). R_ESR is
// Q4.13 (this design's format), i_C Q6.18; the 18x25 product (fraction 31)
// is truncated to Q9.30. Synchronous reset clears VRESR. With LOSSES = 0 the
// register and multiplier are removed and v_O = v_C.
// The VRESR register and equation follow the source design; keeping VRESR at
// the full 40-bit v_O format is this design's choice.
// Ports: clk, rst, en, resr, ic, vc in; vo (combinational from registers)
// and vresr (the register) out.
module fb_vout
  import fb_pkg::*;
#(
  parameter bit LOSSES = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  k_t   resr,
  input  ils_t ic,
  input  vc_t  vc,
  output vc_t  vo,
  output vc_t  vresr
);
  logic signed [MUL_P_W-1:0] p;

  if (LOSSES) begin : g_esr
    fb_dsp_mul u_mul_esr (.a(resr), .b(ic), .p(p));
    always_ff @(posedge clk) begin
      if (rst)     vresr <= '0;
      else if (en) vresr <= vc_t'(p >>> (R_F + ILS_F - VC_F));
    end
  end else begin : g_ideal
    assign p     = '0;
    assign vresr = '0;
  end

  always_comb vo = vc + vresr;
endmodule
