// tb_fb_model - self-checking test of the full-bridge plant model.
//
// Part 1, bit-exact: random switch patterns (no shoot-through), random
// enable and random converter parameters over 20000 cycles; v_C, i_L, v_O
// and the conduction situation are compared every cycle with an integer
// model of the same fixed-point step. Run for the model with and without
// losses. Also checks reset and that en low holds the state.
// Part 2, accuracy: the converter of the evaluation (V_in = 200 V, 20 kHz,
// D = 0.75 bipolar, G_L = 1/16 S, parasitics of the non-ideal converter,
// dt = 16 ns, L = 1 mH, C = 100 uF) is simulated for 2 ms against a
// double-precision Euler model; the states must agree within 5 mV and 5 mA.
module tb_fb_model;
  import fb_pkg::*;
  import tb_fb_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  vin_t vin; k_t gl, dt_l, dt_c; loss_t loss; sw_t sw;
  vc_t vc, vo, vc0, vo0; il_t il, il0; vl_t vl, vl0; ils_t ic, ic0;
  situation_e sit, sit0;
  int checks = 0, failures = 0;
  int sit_seen [3];

  fb_model #(.LOSSES(1'b1)) dut (.clk, .rst, .en, .vin, .gl, .dt_l, .dt_c, .loss, .sw,
    .vc(vc), .il(il), .vo(vo), .vl(vl), .ic(ic), .sit(sit));
  fb_model #(.LOSSES(1'b0)) dut0 (.clk, .rst, .en, .vin, .gl, .dt_l, .dt_c, .loss, .sw,
    .vc(vc0), .il(il0), .vo(vo0), .vl(vl0), .ic(ic0), .sit(sit0));

  always #4 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sw_t rand_sw();
    sw_t s;
    do s = sw_t'(4'($urandom_range(0, 15)));
    while ((s.q1 && s.q4) || (s.q2 && s.q3));
    return s;
  endfunction

  task automatic eval_params();
    vin  = vin_t'(200 * 4);
    gl   = k_t'(8192);                       // 0.0625 S
    dt_l = k_t'(68719);                      // 16 ns / 1 mH  * 2^32
    dt_c = k_t'(85899);                      // 16 ns / 100 uF * 2^29
    loss = '{rdson: k_t'(819), rd: k_t'(6554), rl: k_t'(41), resr: k_t'(2949), vd: k_t'(22938)};
  endtask

  fstate_t f1, f0;
  rstate_t r1;
  rparam_t rp;
  int s1, s0;
  real err_vc, err_il, max_vc, max_il;

  initial begin
    sw = '0;
    eval_params();
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (vc != 0 || il != 0 || vo != 0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    f1 = '{0, 0, 0}; f0 = '{0, 0, 0};
    // ---------------- Part 1: bit-exact ----------------
    for (int n = 0; n < 20000; n++) begin
      if (n % 2000 == 0 && n > 0) begin
        vin  = vin_t'($urandom_range(0, 1023));
        gl   = k_t'($urandom_range(0, 20000));
        dt_l = k_t'($urandom_range(0, 131071));
        dt_c = k_t'($urandom_range(0, 131071));
        loss.rdson = k_t'($urandom_range(0, 4000));
        loss.rd    = k_t'($urandom_range(0, 8000));
        loss.rl    = k_t'($urandom_range(0, 2000));
        loss.resr  = k_t'($urandom_range(0, 8000));
        loss.vd    = k_t'($urandom_range(0, 40000));
      end
      if ($urandom_range(0, 7) == 0) sw = rand_sw();
      en = ($urandom_range(0, 9) != 0);
      #1;
      // combinational situation for the present state
      begin
        fstate_t t; int st;
        t = fix_step(f1, sw, longint'(vin), longint'(gl), longint'(dt_l), longint'(dt_c), loss, 1'b1, st);
        checks++;
        if (int'(sit) != st) begin failures++; if (failures < 10) $display("FAIL sit n=%0d %0d/%0d", n, sit, st); end
        sit_seen[st]++;
      end
      @(posedge clk);
      if (en) begin
        f1 = fix_step(f1, sw, longint'(vin), longint'(gl), longint'(dt_l), longint'(dt_c), loss, 1'b1, s1);
        f0 = fix_step(f0, sw, longint'(vin), longint'(gl), longint'(dt_l), longint'(dt_c), loss, 1'b0, s0);
      end
      #1;
      checks++;
      if (longint'(vc) != f1.vc || longint'(il) != f1.il || longint'(vo) != sext(f1.vc + f1.vresr, 40)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d vc=%0d/%0d il=%0d/%0d vo=%0d", n, vc, f1.vc, il, f1.il, vo);
      end
      checks++;
      if (longint'(vc0) != f0.vc || longint'(il0) != f0.il || vo0 != vc0) begin
        failures++;
        if (failures < 10) $display("FAIL ideal n=%0d vc=%0d/%0d il=%0d/%0d", n, vc0, f0.vc, il0, f0.il);
      end
    end
    $display("situations seen I=%0d III=%0d II=%0d", sit_seen[0], sit_seen[1], sit_seen[2]);
    checks++;
    if (sit_seen[0] == 0 || sit_seen[1] == 0 || sit_seen[2] == 0) failures++;

    // ---------------- Part 2: accuracy against double precision ----------------
    rst = 1; en = 1; eval_params();
    @(posedge clk); #1 rst = 0;
    rp = '{vin: 200.0, gl: 0.0625, dtl: 68719.0 / 2.0**32, dtc: 85899.0 / 2.0**29,
           rdson: 819.0/8192.0, rd: 6554.0/8192.0, rl: 41.0/8192.0, resr: 2949.0/8192.0,
           vd: 22938.0/32768.0};
    r1 = '{0.0, 0.0, 0.0};
    max_vc = 0; max_il = 0;
    for (int n = 0; n < 125000; n++) begin          // 2 ms = 40 switching periods
      sw = ((n % 3125) < 2344) ? sw_t'(4'b1010) : sw_t'(4'b0101);
      @(posedge clk);
      r1 = real_step(r1, sw, rp, 1'b1);
      #1;
      err_vc = real'(vc) / 2.0**30 - r1.vc; if (err_vc < 0) err_vc = -err_vc;
      err_il = real'(il) / 2.0**33 - r1.il; if (err_il < 0) err_il = -err_il;
      if (err_vc > max_vc) max_vc = err_vc;
      if (err_il > max_il) max_il = err_il;
    end
    $display("after 2 ms: vc=%f V (ref %f) il=%f A (ref %f); max err %e V %e A",
             real'(vc) / 2.0**30, r1.vc, real'(il) / 2.0**33, r1.il, max_vc, max_il);
    checks++;
    if (max_vc > 5e-3 || max_il > 5e-3) begin failures++; $display("FAIL accuracy"); end
    checks++;
    if (r1.vc < 50.0) begin failures++; $display("FAIL reference did not charge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
