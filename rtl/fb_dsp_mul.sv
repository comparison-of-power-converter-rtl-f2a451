// fb_dsp_mul - signed 18x25 multiplier, the shape of one FPGA DSP slice.
//
// Every product of the plant model goes through this module, so the operand
// widths stay within what a single embedded multiplier takes. It is purely
// combinational: the plant model is not pipelined, because a register in the
// loop would turn the k-1 terms of the Euler update into k-2 terms.
//
// The 18x25 operand limit is the source design's; the module is this design's
// way of making it explicit.
// Ports: a (18-bit signed), b (25-bit signed), p = a*b (43-bit signed, exact).
module fb_dsp_mul
  import fb_pkg::*;
(
  input  logic signed [MUL_A_W-1:0] a,
  input  logic signed [MUL_B_W-1:0] b,
  output logic signed [MUL_P_W-1:0] p
);
  always_comb p = MUL_P_W'(a) * MUL_P_W'(b);
endmodule
