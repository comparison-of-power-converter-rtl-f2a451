// tb_fb_vl_calc - self-checking test of the inductor-voltage multiplexer.
//
// Applies every switch combination without shoot-through, with both signs of
// i_L (and i_L = 0), random V_in / v_O* / i_L* / parasitics, and compares v_L
// and the conduction situation with a reference written from the case table
// of the converter equations (eight cases plus the two freewheeling states).
// A second instance with LOSSES = 0 is checked against the ideal equations.
module tb_fb_vl_calc;
  import fb_pkg::*;

  vin_t vin; vl_t vo_s; ils_t il_s; sw_t sw; loss_t loss;
  vl_t vl, vl_id; situation_e sit, sit_id;
  int checks = 0, failures = 0;
  int seen [3];

  fb_vl_calc #(.LOSSES(1'b1)) dut    (.vin, .vo_s, .il_s, .sw, .loss, .vl(vl),    .sit(sit));
  fb_vl_calc #(.LOSSES(1'b0)) dut_id (.vin, .vo_s, .il_s, .sw, .loss, .vl(vl_id), .sit(sit_id));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: returns v_L on the Q9.15 grid (as a wide integer)
  function automatic longint ref_vl(bit losses, output int s_sit);
    longint vin15, vo, il, vd, rds, rd, rl, r, sgn, src, nd, vloss;
    bit pos;
    vin15 = longint'(vin) <<< 13;
    vo = longint'(vo_s); il = longint'(il_s);
    vd = longint'(loss.vd); rds = longint'(loss.rdson); rd = longint'(loss.rd); rl = longint'(loss.rl);
    pos = (il >= 0);
    sgn = pos ? 1 : -1;
    if (sw == 4'b1010)      begin s_sit = 0; src =  vin15; end            // Q1,Q3
    else if (sw == 4'b0101) begin s_sit = 0; src = -vin15; end            // Q2,Q4
    else if (sw == 4'b1100 || sw == 4'b0011) begin s_sit = 0; src = 0; end // freewheel
    else if (sw == 4'b0000) begin s_sit = 2; src = pos ? -vin15 : vin15; end
    else if (sw == 4'b1000 || sw == 4'b0010) begin s_sit = 1; src = pos ? 0 : vin15; end   // only Q1 or Q3
    else                    begin s_sit = 1; src = pos ? -vin15 : 0; end   // only Q2 or Q4
    case (s_sit)
      0: begin nd = 0; r = 2*rds + rl; end
      1: begin nd = 1; r = rds + rd + rl; end
      default: begin nd = 2; r = 2*rd + rl; end
    endcase
    vloss = nd * vd * sgn + ((r * il) >>> 16);
    if (!losses) vloss = 0;
    return src - vo - vloss;
  endfunction

  task automatic check();
    longint e, eid; int es, dummy;
    #1;
    e = ref_vl(1'b1, es);
    eid = ref_vl(1'b0, dummy);
    checks++;
    if (longint'(vl) != e || int'(sit) != es) begin
      failures++;
      if (failures < 10) $display("FAIL sw=%b il=%0d vl=%0d exp=%0d sit=%0d exp=%0d", sw, il_s, vl, e, sit, es);
    end
    checks++;
    if (longint'(vl_id) != eid) begin
      failures++;
      if (failures < 10) $display("FAIL ideal sw=%b vl=%0d exp=%0d", sw, vl_id, eid);
    end
    seen[es]++;
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      sw = sw_t'(4'($urandom_range(0, 15)));
      if ((sw.q1 && sw.q4) || (sw.q2 && sw.q3)) continue;
      vin  = vin_t'($urandom_range(0, 1023));               // 0 .. 255.75 V
      vo_s = vl_t'($signed($urandom_range(0, 2**23)) - 2**22); // +-128 V
      case (n % 5)
        0:       il_s = '0;
        default: il_s = ils_t'($signed($urandom_range(0, 2**23)) - 2**22); // +-16 A
      endcase
      // evaluation parasitics and random parasitics on alternate vectors
      if (n % 2 == 0) begin
        loss.rdson = k_t'(819);   // 0.1 ohm
        loss.rd    = k_t'(6554);  // 0.8 ohm
        loss.rl    = k_t'(41);    // 0.005 ohm
        loss.resr  = k_t'(2949);  // 0.36 ohm
        loss.vd    = k_t'(22938); // 0.7 V
      end else begin
        loss.rdson = k_t'($urandom_range(0, 16383));
        loss.rd    = k_t'($urandom_range(0, 16383));
        loss.rl    = k_t'($urandom_range(0, 16383));
        loss.resr  = k_t'($urandom_range(0, 16383));
        loss.vd    = k_t'($urandom_range(0, 65535));
      end
      check();
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("situations I=%0d III=%0d II=%0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
