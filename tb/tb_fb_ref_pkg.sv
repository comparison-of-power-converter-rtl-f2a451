// tb_fb_ref_pkg - reference models of the full-bridge converter for the
// testbenches.
//
// vl_case: the inductor-voltage case table (which source voltage and which
//   conduction situation apply for each switch pattern and current sign),
//   written directly from the converter equations rather than from the
//   leg-by-leg rule the RTL uses.
// fix_step: one Euler step of the fixed-point model, done in 64-bit integer
//   arithmetic with the same formats and truncations as the RTL; bit-exact.
// real_step: one Euler step in double precision, the accuracy reference
//   (no feedback truncation, no quantisation other than double rounding).
package tb_fb_ref_pkg;
  import fb_pkg::*;

  typedef struct {
    real vin, gl, dtl, dtc, rdson, rd, rl, resr, vd;
  } rparam_t;

  typedef struct {
    real vc, il, vresr;
  } rstate_t;

  typedef struct {
    longint vc, il, vresr;
  } fstate_t;

  // src: -1/0/+1 multiple of V_in; returns situation (0=I, 1=III, 2=II)
  function automatic int vl_case(sw_t sw, bit il_pos, output int src);
    logic [3:0] s;
    s = sw;
    if (s == 4'b1010)                      begin src =  1; return 0; end // Q1,Q3
    if (s == 4'b0101)                      begin src = -1; return 0; end // Q2,Q4
    if (s == 4'b1100 || s == 4'b0011)      begin src =  0; return 0; end // freewheel
    if (s == 4'b0000)                      begin src = il_pos ? -1 : 1; return 2; end
    if (s == 4'b1000 || s == 4'b0010)      begin src = il_pos ? 0 : 1; return 1; end // only Q1 or Q3
    src = il_pos ? -1 : 0; return 1;                                             // only Q2 or Q4
  endfunction

  function automatic real r_path(int sit, real rdson, real rd, real rl);
    case (sit)
      0: return 2.0*rdson + rl;
      1: return rdson + rd + rl;
      default: return 2.0*rd + rl;
    endcase
  endfunction

  function automatic longint sext(longint x, int w);
    longint m;
    m = longint'(1) <<< (w - 1);
    x = x & ((longint'(1) <<< w) - 1);
    return (x ^ m) - m;
  endfunction

  // Fixed-point step. Integer inputs in their RTL formats.
  function automatic fstate_t fix_step(fstate_t s, sw_t sw, longint vin, longint gl,
                                       longint dtl, longint dtc, loss_t loss, bit losses,
                                       output int sit);
    fstate_t n;
    longint vo, vo_s, il_s, ir, ic, vl, vloss, r, src_v;
    int src;
    vo   = sext(s.vc + s.vresr, 40);
    vo_s = vo >>> 15;
    il_s = s.il >>> 15;
    ir   = sext((gl * vo_s) >>> 9, 30);
    ic   = sext(il_s - (ir >>> 5), 25);
    sit  = vl_case(sw, il_s >= 0, src);
    src_v = longint'(src) * (vin <<< 13);
    case (sit)
      0: r = 2*longint'(loss.rdson) + longint'(loss.rl);
      1: r = longint'(loss.rdson) + longint'(loss.rd) + longint'(loss.rl);
      default: r = 2*longint'(loss.rd) + longint'(loss.rl);
    endcase
    r = sext(r, 18);
    vloss = (sit == 0 ? 0 : sit == 1 ? 1 : 2) * longint'(loss.vd) * (il_s >= 0 ? 1 : -1)
          + ((r * il_s) >>> 16);
    if (!losses) vloss = 0;
    vl = sext(src_v - vo_s - vloss, 25);
    n.vc    = sext(s.vc + ((dtc * ic) >>> 17), 40);
    n.il    = sext(s.il + ((dtl * vl) >>> 14), 40);
    n.vresr = losses ? sext((longint'(loss.resr) * ic) >>> 1, 40) : 0;
    return n;
  endfunction

  // Double-precision step
  function automatic rstate_t real_step(rstate_t s, sw_t sw, rparam_t p, bit losses);
    rstate_t n;
    real vo, ic, vl, vloss;
    int src, sit;
    vo  = s.vc + s.vresr;
    ic  = s.il - p.gl * vo;
    sit = vl_case(sw, s.il >= 0.0, src);
    vloss = (sit == 0 ? 0.0 : sit == 1 ? 1.0 : 2.0) * p.vd * (s.il >= 0.0 ? 1.0 : -1.0)
          + r_path(sit, p.rdson, p.rd, p.rl) * s.il;
    if (!losses) vloss = 0.0;
    vl  = real'(src) * p.vin - vo - vloss;
    n.vc    = s.vc + p.dtc * ic;
    n.il    = s.il + p.dtl * vl;
    n.vresr = losses ? p.resr * ic : 0.0;
    return n;
  endfunction

endpackage
